// cell_buffer: the shared on-chip cell buffer.
//
// Holds N whole ATM cells (256 x 53 bytes, about 110 kbit, as in the chip
// description). All input links write into and all output links read from this
// one memory; which cells belong to which output is kept by the queue manager.
// This design moves a whole cell per access: one write and one read port, each
// usable every cycle, which at a 50 MHz core clock and a 34-cycle cell time is
// more than the 16 writes and 16 reads needed per cell time. The chip's buffer
// is pipelined and byte-sliced; that organisation is not given in detail and is
// not reproduced.
//
// Timing: write at the clock edge; read data is registered (rd_data is valid
// the cycle after rd_en).
module cell_buffer #(
  parameter int unsigned N     = atlas_pkg::N_CELLS,
  parameter int unsigned WIDTH = atlas_pkg::CELL_W
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_addr,
  input  logic [WIDTH-1:0]     wr_data,
  input  logic                 rd_en,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic [WIDTH-1:0]     rd_data
);
  logic [WIDTH-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
