// link_tx: output side of a link; turns cells and credits into characters.
//
// The switch core hands over whole cells and upstream credits. This block sends
// them as a character stream, one character per clock: a cell is a begin-of-cell
// control character followed by its 53 bytes, header first; a credit is a
// credit control character followed by one byte with the flow group. Credits
// go first and may be inserted between any two characters of a cell, so a
// credit never waits for a cell to finish. Sending credits as dedicated control
// characters at any character boundary follows the chip description of its
// IEEE 1355 links; the character codes, the one-character-per-clock rate and
// the queue sizes are choices of this design (the serial coding, link clock and
// elastic buffers are not modelled). When nothing is to be sent the idle
// control character goes out.
//
// Interface: cell_valid/cell_data push a cell into a CELLQ-deep queue; cr_valid/
// cr_fg push a credit into a CRQ-deep queue. ch is the character of the
// current clock (registered). The core must pace its cells so the queues do
// not overflow; assertions watch both.
module link_tx
  import atlas_pkg::*;
#(
  parameter int unsigned CELLQ = 2,
  parameter int unsigned CRQ   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cell_valid,
  input  atm_cell_t        cell_data,
  input  logic             cr_valid,
  input  logic [FG_W-1:0]  cr_fg,
  output link_char_t       ch,
  output logic             cell_full,
  output logic             cr_full
);
  localparam int unsigned CW = $clog2(CELLQ + 1);
  localparam int unsigned RW = $clog2(CRQ + 1);

  atm_cell_t       cq [CELLQ];
  logic [FG_W-1:0] rq [CRQ];
  logic [CW-1:0]   c_cnt;
  logic [RW-1:0]   r_cnt;
  logic [$clog2(CELLQ)-1:0] c_rd, c_wr;
  logic [$clog2(CRQ)-1:0]   r_rd, r_wr;
  logic [5:0]      pos;          // next cell character: 0 = BOC, 1..53 bytes
  logic            cr_mid;       // credit control sent, flow group byte next

  logic c_pop, r_pop;
  link_char_t nxt;

  assign cell_full = (c_cnt == CW'(CELLQ));
  assign cr_full   = (r_cnt == RW'(CRQ));

  always_comb begin
    nxt   = '{ctrl: 1'b1, data: CH_IDLE};
    c_pop = 1'b0;
    r_pop = 1'b0;
    if (cr_mid) begin
      nxt   = '{ctrl: 1'b0, data: 8'(rq[r_rd])};
      r_pop = 1'b1;
    end else if (r_cnt != '0) begin
      nxt = '{ctrl: 1'b1, data: CH_CREDIT};
    end else if (c_cnt != '0) begin
      if (pos == '0) nxt = '{ctrl: 1'b1, data: CH_BOC};
      else begin
        nxt = '{ctrl: 1'b0, data: cq[c_rd][CELL_W - 8*(int'(pos) - 1) - 1 -: 8]};
        c_pop = (pos == 6'(CELL_BYTES));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cell_valid && !cell_full) cq[c_wr] <= cell_data;
    if (cr_valid && !cr_full)     rq[r_wr] <= cr_fg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch     <= '{ctrl: 1'b1, data: CH_IDLE};
      c_cnt  <= '0; r_cnt <= '0;
      c_rd   <= '0; c_wr  <= '0;
      r_rd   <= '0; r_wr  <= '0;
      pos    <= '0;
      cr_mid <= 1'b0;
    end else begin
      ch <= nxt;
      // credit state
      if (cr_mid)               cr_mid <= 1'b0;
      else if (r_cnt != '0)     cr_mid <= 1'b1;
      // cell position advances only when a cell character went out
      if (!cr_mid && r_cnt == '0 && c_cnt != '0)
        pos <= c_pop ? '0 : pos + 6'd1;
      if (cell_valid && !cell_full) c_wr <= (c_wr == ($clog2(CELLQ))'(CELLQ - 1)) ? '0 : c_wr + 1'b1;
      if (c_pop)                    c_rd <= (c_rd == ($clog2(CELLQ))'(CELLQ - 1)) ? '0 : c_rd + 1'b1;
      if (cr_valid && !cr_full)     r_wr <= (r_wr == ($clog2(CRQ))'(CRQ - 1)) ? '0 : r_wr + 1'b1;
      if (r_pop)                    r_rd <= (r_rd == ($clog2(CRQ))'(CRQ - 1)) ? '0 : r_rd + 1'b1;
      c_cnt <= c_cnt + CW'(cell_valid && !cell_full) - CW'(c_pop);
      r_cnt <= r_cnt + RW'(cr_valid && !cr_full) - RW'(r_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cell_valid |-> !cell_full)
    else $error("link_tx: cell queue overflow");
  assert property (@(posedge clk) disable iff (!rst_n) cr_valid |-> !cr_full)
    else $error("link_tx: credit queue overflow");
endmodule
