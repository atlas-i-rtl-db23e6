// atlas_chip: the 16-link ATM switch with its links at character level.
//
// Wraps the switch core (atlas_switch) with one link receiver (link_rx) and
// one link transmitter (link_tx) per link. Each link carries, in both
// directions, a stream of decoded characters: cells as a begin-of-cell
// character and 53 bytes, and flow-control credits as a credit character and
// a flow-group byte, which may be slipped in between any two characters,
// including inside a cell. The receiver of link j extracts the credits that
// the downstream switch on link j sends back (they refill the credit counts of
// output j) and collects cells for the core; the transmitter of link j sends
// the core's cells for output j and inserts the credits the core returns to
// the upstream switch on link j. Bidirectional links carrying both cells and
// credits as control characters follow the chip description; the character
// codes and rates are this design's.
//
// Timing: one character per clock on every link, so a cell occupies a link
// for 54 clocks plus any credits sent with it. The core is set to send at most
// one cell per LINK_CELL_CYCLES clocks on each output link (default 58: a cell
// and two credits), and the transmitter's two-cell queue absorbs the delay of
// a longer burst of credits. The serial coding, the link clock, the elastic
// buffers between link and core clocks and cut-through of cells are not
// modelled: a cell enters the core once its last byte has arrived.
// st_link_errors counts malformed streams (a cell cut short, a stray byte).
// CREDIT_QUEUE must be at least half the largest pool granted upstream on a
// link, since the core can return that many credits back to back.
//
// Management, configuration and statistics ports are those of atlas_switch.
module atlas_chip
  import atlas_pkg::*;
#(
  parameter int unsigned LINK_CELL_CYCLES = CHARS_PER_CELL + 2 * CHARS_PER_CREDIT,
  parameter int unsigned CREDIT_QUEUE     = 16
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // links: one character per clock in and out
  input  link_char_t [N_LINKS-1:0]               rx_ch,
  output link_char_t [N_LINKS-1:0]               tx_ch,
  output logic      [31:0]                       st_link_errors,
  // management: translation table
  input  logic                                   tt_wr,
  input  logic [$clog2(N_LINKS)+TT_VCI_BITS-1:0] tt_wr_idx,
  input  tt_entry_t                              tt_wr_entry,
  // management: configuration
  input  logic      [N_LINKS-1:0]                cfg_credit_en,
  input  logic      [N_LINKS-1:0][1:0]           cfg_bundle_mode,
  input  logic                                   cfg_pool_load,
  input  logic      [N_LINKS-1:0][$clog2(N_CELLS):0] cfg_pool_init,
  input  logic      [$clog2(N_CELLS):0]          cfg_efci_thresh,
  input  logic      [$clog2(N_CELLS):0]          cfg_bp_reserve,
  input  logic                                   mon_clear,
  input  logic      [N_VBUF-1:0][$clog2(N_CELLS):0] mon_size,
  input  logic      [N_VBUF-1:0][15:0]           mon_period,
  // status
  output logic      [N_VBUF-1:0][31:0]           mon_arrivals,
  output logic      [N_VBUF-1:0][31:0]           mon_losses,
  output logic      [N_VBUF-1:0][$clog2(N_CELLS):0] mon_occupancy,
  output logic      [$clog2(N_CELLS):0]          ccl_occupancy,
  output logic      [$clog2(N_CELLS):0]          buf_occupancy,
  output logic      [31:0]                       st_cells_in,
  output logic      [31:0]                       st_cells_out,
  output logic      [31:0]                       st_drop_noroute,
  output logic      [31:0]                       st_drop_full,
  output logic      [31:0]                       st_drop_overrun,
  output logic      [31:0]                       st_efci,
  output logic      [31:0]                       st_ccl_moves,
  output logic      [31:0]                       st_stalls
);
  logic      [N_LINKS-1:0]           c_in_valid, c_out_valid, c_cr_in_valid, c_cr_out_valid;
  atm_cell_t [N_LINKS-1:0]           c_in_cell, c_out_cell;
  logic      [N_LINKS-1:0][FG_W-1:0] c_cr_in_fg, c_cr_out_fg;
  logic      [N_LINKS-1:0]           rx_err, tx_cell_full, tx_cr_full;

  for (genvar j = 0; j < N_LINKS; j++) begin : g_link
    link_rx u_rx (
      .clk, .rst_n,
      .ch         (rx_ch[j]),
      .cell_valid (c_in_valid[j]),
      .cell_data  (c_in_cell[j]),
      .cr_valid   (c_cr_in_valid[j]),
      .cr_fg      (c_cr_in_fg[j]),
      .err        (rx_err[j])
    );
    link_tx #(.CRQ(CREDIT_QUEUE)) u_tx (
      .clk, .rst_n,
      .cell_valid (c_out_valid[j]),
      .cell_data  (c_out_cell[j]),
      .cr_valid   (c_cr_out_valid[j]),
      .cr_fg      (c_cr_out_fg[j]),
      .ch         (tx_ch[j]),
      .cell_full  (tx_cell_full[j]),
      .cr_full    (tx_cr_full[j])
    );
  end

  atlas_switch #(.CYCLES_PER_CELL(LINK_CELL_CYCLES)) u_core (
    .clk, .rst_n,
    .in_valid        (c_in_valid),
    .in_cell         (c_in_cell),
    .out_valid       (c_out_valid),
    .out_cell        (c_out_cell),
    .cr_in_valid     (c_cr_in_valid),
    .cr_in_fg        (c_cr_in_fg),
    .cr_out_valid    (c_cr_out_valid),
    .cr_out_fg       (c_cr_out_fg),
    .tt_wr           (tt_wr),
    .tt_wr_idx       (tt_wr_idx),
    .tt_wr_entry     (tt_wr_entry),
    .cfg_credit_en   (cfg_credit_en),
    .cfg_bundle_mode (cfg_bundle_mode),
    .cfg_pool_load   (cfg_pool_load),
    .cfg_pool_init   (cfg_pool_init),
    .cfg_efci_thresh (cfg_efci_thresh),
    .cfg_bp_reserve  (cfg_bp_reserve),
    .mon_clear       (mon_clear),
    .mon_size        (mon_size),
    .mon_period      (mon_period),
    .mon_arrivals    (mon_arrivals),
    .mon_losses      (mon_losses),
    .mon_occupancy   (mon_occupancy),
    .ccl_occupancy   (ccl_occupancy),
    .buf_occupancy   (buf_occupancy),
    .st_cells_in     (st_cells_in),
    .st_cells_out    (st_cells_out),
    .st_drop_noroute (st_drop_noroute),
    .st_drop_full    (st_drop_full),
    .st_drop_overrun (st_drop_overrun),
    .st_efci         (st_efci),
    .st_ccl_moves    (st_ccl_moves),
    .st_stalls       (st_stalls)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_link_errors <= '0;
    else        st_link_errors <= st_link_errors + 32'($countones(rx_err));
  end

  // The transmitters' queues are sized so that they never fill.
  assert property (@(posedge clk) disable iff (!rst_n) (c_out_valid & tx_cell_full) == '0)
    else $error("atlas_chip: cell sent to a full link transmitter");
  assert property (@(posedge clk) disable iff (!rst_n) (c_cr_out_valid & tx_cr_full) == '0)
    else $error("atlas_chip: credit sent to a full link transmitter");
endmodule
