// free_list: which slots of the shared cell buffer are free.
//
// One flip-flop per buffer slot (256 of them) holds a 1 when the slot is free;
// a priority encoder hands out the lowest-numbered free slot. This is the
// organisation the chip description gives for its free list. Allocation and
// release may happen in the same cycle. Reset marks every slot free.
//
// Interface: alloc_addr/empty are combinational from the current state; a slot
// is taken at the clock edge where alloc is high. free_valid/free_addr return a
// slot at the clock edge. free_count is the number of free slots.
module free_list #(
  parameter int unsigned N = atlas_pkg::N_CELLS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 alloc,
  output logic [$clog2(N)-1:0] alloc_addr,
  output logic                 empty,
  input  logic                 free_valid,
  input  logic [$clog2(N)-1:0] free_addr,
  output logic [$clog2(N):0]   free_count
);
  localparam int unsigned AW = $clog2(N);

  logic [N-1:0] free_q;

  // Priority encoder: lowest free slot.
  always_comb begin
    alloc_addr = '0;
    for (int i = N - 1; i >= 0; i--)
      if (free_q[i]) alloc_addr = AW'(i);
  end

  assign empty = (free_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_q     <= '1;
      free_count <= ($clog2(N) + 1)'(N);
    end else begin
      if (alloc && !empty) free_q[alloc_addr] <= 1'b0;
      if (free_valid)      free_q[free_addr]  <= 1'b1;
      free_count <= free_count - ($clog2(N) + 1)'(alloc && !empty) + ($clog2(N) + 1)'(free_valid);
    end
  end

  // A slot may only be returned while it is in use.
  assert property (@(posedge clk) disable iff (!rst_n)
                   free_valid |-> !free_q[free_addr] || (alloc && !empty && alloc_addr == free_addr))
    else $error("free_list: slot %0d released twice", free_addr);

endmodule
