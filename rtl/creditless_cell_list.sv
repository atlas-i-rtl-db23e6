// creditless_cell_list: back-pressured cells waiting for a credit.
//
// When the cell at the head of a back-pressured queue cannot leave because its
// flow group has no credit (or the output has no pool credit), it is moved out
// of the FIFO into this list so the cells behind it are not blocked. The list
// is searched associatively: given an output and the set of flow groups that
// may send on it now, it finds a waiting cell for that output whose flow group
// is in the set, preferring the middle class over the low class. Order among
// the waiting cells does not matter, because the credit protocol lets at most
// one cell of a flow group into a switch at a time. The chip has a full-custom
// "creditless cell list" with search ports; its insides are not given, and this
// is a plain content-addressed array with a priority encoder.
//
// Interface: insert (one per cycle, written at the clock edge into the lowest
// free entry; full says there is none), search (combinational) and take (removes
// the found entry at the clock edge). Insert and take may share a cycle.
module creditless_cell_list #(
  parameter int unsigned ENTRIES = atlas_pkg::N_CELLS,
  parameter int unsigned OUTS    = atlas_pkg::N_LINKS,
  parameter int unsigned FGW     = atlas_pkg::FG_W,
  parameter int unsigned N       = atlas_pkg::N_CELLS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // insert
  input  logic                     ins_valid,
  input  logic [$clog2(OUTS)-1:0]  ins_out,
  input  logic                     ins_low,     // 0: middle class, 1: low class
  input  logic [FGW-1:0]           ins_fg,
  input  logic [$clog2(N)-1:0]     ins_addr,
  output logic                     full,
  // search
  input  logic [$clog2(OUTS)-1:0]  srch_out,
  input  logic [(1<<FGW)-1:0]      srch_fg_ok,
  output logic                     hit,
  output logic                     hit_low,
  output logic [FGW-1:0]           hit_fg,
  output logic [$clog2(N)-1:0]     hit_addr,
  input  logic                     take,
  // status
  output logic [$clog2(ENTRIES):0] count
);
  localparam int unsigned EW = $clog2(ENTRIES);

  typedef struct packed {
    logic [$clog2(OUTS)-1:0] out;
    logic                    low;
    logic [FGW-1:0]          fg;
    logic [$clog2(N)-1:0]    addr;
  } ccl_entry_t;

  ccl_entry_t       ent   [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [EW-1:0]      free_idx, hit_idx;

  // Lowest free entry for insertion.
  always_comb begin
    free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid_q[i]) free_idx = EW'(i);
  end
  assign full = &valid_q;

  // Search: middle-class matches first, then low-class; lowest index within.
  always_comb begin
    logic [ENTRIES-1:0] m_mid, m_low;
    for (int i = 0; i < ENTRIES; i++) begin
      logic m;
      m = valid_q[i] && ent[i].out == srch_out && srch_fg_ok[ent[i].fg];
      m_mid[i] = m && !ent[i].low;
      m_low[i] = m &&  ent[i].low;
    end
    hit     = |m_mid || |m_low;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (m_low[i]) hit_idx = EW'(i);
    if (|m_mid)
      for (int i = ENTRIES - 1; i >= 0; i--)
        if (m_mid[i]) hit_idx = EW'(i);
    hit_low  = ent[hit_idx].low;
    hit_fg   = ent[hit_idx].fg;
    hit_addr = ent[hit_idx].addr;
  end

  always_ff @(posedge clk) begin
    if (ins_valid && !full)
      ent[free_idx] <= '{out: ins_out, low: ins_low, fg: ins_fg, addr: ins_addr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      count   <= '0;
    end else begin
      if (take && hit)          valid_q[hit_idx]  <= 1'b0;
      if (ins_valid && !full)   valid_q[free_idx] <= 1'b1;
      count <= count + ($clog2(ENTRIES) + 1)'(ins_valid && !full)
                     - ($clog2(ENTRIES) + 1)'(take && hit);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ins_valid |-> !full)
    else $error("creditless_cell_list: insert while full");
endmodule
