// translation_table: the routing / VP-VC translation table.
//
// Indexed by the incoming link and the low TT_VCI_BITS bits of the incoming
// VCI. Each entry gives a mask of outputs (several bits set means the cell is
// multicast), the service class, the new VPI/VCI that every copy carries, and
// whether the VC feeds the load monitor. That an entry holds an output mask and
// that all copies get the same VPI/VCI follows the chip description; the
// indexing, the table size and the other fields are choices of this design.
//
// Interface: a management write port (wr_en, wr_idx, wr_entry) and a lookup
// port. Lookup is combinational. Reset clears every entry's valid bit; an
// invalid entry means "unroutable, drop".
module translation_table
  import atlas_pkg::*;
#(
  parameter int unsigned LINKS    = N_LINKS,
  parameter int unsigned VCI_BITS = TT_VCI_BITS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 wr_en,
  input  logic [$clog2(LINKS)+VCI_BITS-1:0]    wr_idx,
  input  tt_entry_t                            wr_entry,
  input  logic [$clog2(LINKS)-1:0]             lk_link,
  input  logic [15:0]                          lk_vci,
  output tt_entry_t                            lk_entry
);
  localparam int unsigned DEPTH = LINKS << VCI_BITS;
  localparam int unsigned IW    = $clog2(LINKS) + VCI_BITS;

  tt_entry_t   mem   [DEPTH];
  logic [DEPTH-1:0] valid_q;
  logic [IW-1:0]    lk_idx;

  assign lk_idx = {lk_link, lk_vci[VCI_BITS-1:0]};

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= wr_entry.valid;
  end

  always_comb begin
    lk_entry       = mem[lk_idx];
    lk_entry.valid = valid_q[lk_idx];
  end
endmodule
