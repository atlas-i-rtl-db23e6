// atlas_switch: core of a 16x16 single-chip ATM switch with a shared buffer
// and multi-lane credit (back-pressure) flow control.
//
// Buffer sharing. Cells that are not under credit flow control share the whole
// buffer except a reserve (cfg_bp_reserve, set to the sum of the pool sizes
// granted to upstream neighbours) that is kept for credit-controlled cells, so
// those never find the buffer full; a cell outside credit control that finds
// only reserved slots free is dropped (st_drop_full).
//
// Data path. Each input link delivers whole cells into a one-cell input
// register. A round-robin arbiter takes one waiting cell per cycle, looks up
// its VC in the translation table, takes a free slot from the free list, writes
// the cell (with new VPI/VCI, EFCI mark and HEC) into the shared buffer and
// links the slot into the queue of its service class at every output in the
// entry's mask (multicast). On the output side one free output link per cycle
// is chosen round-robin and given a cell: the top-priority queue first, then a
// middle- or low-class cell that was waiting in the creditless cell list and
// has now got credit, then the head of the middle and then the low queue. A
// back-pressured head cell without credit is moved to the creditless cell list
// instead, so it does not block the cells behind it. A sent cell keeps its link
// busy for CELL_CYCLES cycles (one cell time). When the last copy of a cell has
// left, its slot returns to the free list and, if it came in under credit flow
// control, a credit with its incoming flow group goes back on the link it came
// from. Credits arriving on link j refill the pool and flow-group credits of
// output j (or of j's bundle).
//
// From the chip description: 16 links, 256-cell shared buffer, per-output
// logical queues for three service classes with the top class never
// back-pressured, multicast masks with one VPI/VCI for all copies, EFCI, the
// pool/flow-group credit rules, link bundling in pairs, quads and octets, and
// load monitoring with simulated smaller buffers. Choices of this design: whole
// cells move in one cycle (the chip cuts cells through byte by byte over serial
// links, which is not modelled), the flow group of a cell on a link is the low
// FG_W bits of its VCI, the translation table index, the queue and list
// organisation, the EFCI threshold rule, and the management ports, which are
// plain configuration inputs instead of a processor interface.
//
// Mechanisms counted in the statistics outputs: cells admitted and sent,
// drops (no route, no room, input overrun), EFCI marks, moves into the
// creditless list, and input stalls (an admitted cell's dropped-credit would
// collide with a departure credit on the same link; the input retries).
//
// Timing: an admitted cell can be written at cycle t, chosen for output at
// t+1 and appear on out_cell at t+2.
module atlas_switch
  import atlas_pkg::*;
#(
  parameter int unsigned CYCLES_PER_CELL = CELL_CYCLES
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // cell links
  input  logic      [N_LINKS-1:0]                in_valid,
  input  atm_cell_t [N_LINKS-1:0]                in_cell,
  output logic      [N_LINKS-1:0]                out_valid,
  output atm_cell_t [N_LINKS-1:0]                out_cell,
  // credits: received from downstream on link j, sent upstream on link j
  input  logic      [N_LINKS-1:0]                cr_in_valid,
  input  logic      [N_LINKS-1:0][FG_W-1:0]      cr_in_fg,
  output logic      [N_LINKS-1:0]                cr_out_valid,
  output logic      [N_LINKS-1:0][FG_W-1:0]      cr_out_fg,
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
  localparam int unsigned AW = $clog2(N_CELLS);
  localparam int unsigned LW = $clog2(N_LINKS);
  localparam int unsigned OW = AW + 1;
  localparam int unsigned F  = 1 << FG_W;
  localparam int unsigned TW = $clog2(CYCLES_PER_CELL + 1);

  // Per-cell bookkeeping, indexed by buffer slot.
  typedef struct packed {
    logic [LW-1:0]   in_link;  // where its credit goes back
    logic [FG_W-1:0] in_fg;    // incoming flow group
    logic            bp_in;    // arrived under credit flow control
    logic [FG_W-1:0] out_fg;   // outgoing flow group
  } cell_meta_t;

  // ---------------------------------------------------------------- bundling
  logic [N_LINKS-1:0][LW-1:0] leader;
  logic [N_LINKS-1:0]         is_leader;

  bundle_map #(.LINKS(N_LINKS)) u_bundle (
    .mode(cfg_bundle_mode), .leader(leader), .is_leader(is_leader));

  // ---------------------------------------------------------- input registers
  logic      [N_LINKS-1:0] hold_v;
  atm_cell_t [N_LINKS-1:0] hold_cell;
  logic                    in_take;    // selected input consumed this cycle
  logic [LW-1:0]           in_sel;
  logic                    in_any;
  logic [LW-1:0]           in_rr;

  // Round-robin choice among waiting inputs, starting at in_rr.
  always_comb begin
    in_any = 1'b0;
    in_sel = '0;
    for (int i = N_LINKS - 1; i >= 0; i--) begin
      logic [LW-1:0] j;
      j = in_rr + LW'(i);
      if (hold_v[j]) begin
        in_any = 1'b1;
        in_sel = j;
      end
    end
  end

  // ------------------------------------------------------- admission stage
  tt_entry_t          tt_e;
  atm_cell_t          sel_cell;
  atm_hdr_t           new_hdr;
  logic               efci_mark;
  logic [N_LINKS-1:0] mask_l;
  logic               fl_empty;
  logic [AW-1:0]      fl_addr;
  logic [OW-1:0]      fl_count;
  logic               admit, drop_nr, drop_full, sel_bp;
  logic               drop_credit, stall;
  logic [OW-1:0]      bp_cells, bp_room;

  assign sel_cell = hold_cell[in_sel];

  translation_table u_tt (
    .clk, .rst_n,
    .wr_en(tt_wr), .wr_idx(tt_wr_idx), .wr_entry(tt_wr_entry),
    .lk_link(in_sel), .lk_vci(sel_cell.hdr.vci), .lk_entry(tt_e));

  assign buf_occupancy = OW'(N_CELLS) - fl_count;

  header_rewrite u_hdr (
    .hdr_in(sel_cell.hdr), .new_vpi(tt_e.new_vpi), .new_vci(tt_e.new_vci),
    .occupancy(buf_occupancy), .efci_thresh(cfg_efci_thresh),
    .hdr_out(new_hdr), .efci_marked(efci_mark));

  assign mask_l = tt_e.out_mask & is_leader;
  assign sel_bp = cfg_credit_en[in_sel] && (tt_e.cls != CLS_HIGH);

  // ------------------------------------------------------- output stage
  logic [N_LINKS-1:0][CLS_LOW:0][AW-1:0] q_head;
  logic [N_LINKS-1:0][CLS_LOW:0]         q_ne;
  logic [N_LINKS-1:0][F-1:0]             fg_cr;
  logic [N_LINKS-1:0][OW-1:0]            pool_cr;
  logic [N_LINKS-1:0][TW-1:0]            tx_cnt;
  logic [N_LINKS-1:0][OW-1:0]            ccl_per_out;
  logic [LW-1:0]                         out_rr, out_sel, out_port;
  logic                                  out_any;
  logic                                  ccl_full, ccl_hit;
  logic [FG_W-1:0]                       ccl_hit_fg;
  logic [AW-1:0]                         ccl_hit_addr;
  cell_meta_t                            meta [N_CELLS];
  logic [LW:0]                           refcnt [N_CELLS];

  // A link is a candidate if it is idle and its bundle has cells waiting.
  always_comb begin
    out_any = 1'b0;
    out_sel = '0;
    for (int i = N_LINKS - 1; i >= 0; i--) begin
      logic [LW-1:0] k;
      k = out_rr + LW'(i);
      if (tx_cnt[k] == '0 && (|q_ne[leader[k]] || ccl_per_out[leader[k]] != '0)) begin
        out_any = 1'b1;
        out_sel = k;
      end
    end
  end
  assign out_port = leader[out_sel];

  // Decision for the chosen output port.
  logic               pool_ok, cr_on;
  logic [F-1:0]       fg_ok;
  logic               send, deq, move, take_ccl, consume;
  logic [1:0]         deq_cls;
  logic [AW-1:0]      send_addr;
  logic [FG_W-1:0]    send_fg;
  logic [FG_W-1:0]    head_fg;

  assign pool_ok = (pool_cr[out_port] != '0);
  assign cr_on   = cfg_credit_en[out_port];
  assign fg_ok   = pool_ok ? fg_cr[out_port] : '0;

  always_comb begin
    send = 1'b0; deq = 1'b0; move = 1'b0; take_ccl = 1'b0; consume = 1'b0;
    deq_cls = CLS_HIGH; send_addr = '0; send_fg = '0; head_fg = '0;
    if (out_any) begin
      if (q_ne[out_port][CLS_HIGH]) begin
        send = 1'b1; deq = 1'b1; deq_cls = CLS_HIGH;
        send_addr = q_head[out_port][CLS_HIGH];
      end else if (ccl_hit) begin
        send = 1'b1; take_ccl = 1'b1; consume = 1'b1;
        send_addr = ccl_hit_addr; send_fg = ccl_hit_fg;
      end else if (q_ne[out_port][CLS_MID] || q_ne[out_port][CLS_LOW]) begin
        deq_cls   = q_ne[out_port][CLS_MID] ? CLS_MID : CLS_LOW;
        send_addr = q_head[out_port][deq_cls];
        head_fg   = meta[send_addr].out_fg;
        send_fg   = head_fg;
        deq       = 1'b1;
        if (!cr_on || fg_ok[head_fg]) begin
          send = 1'b1; consume = cr_on;
        end else if (!ccl_full) begin
          move = 1'b1;
        end else begin
          deq = 1'b0;
        end
      end
    end
  end

  // Release of a cell's slot after its last copy leaves.
  logic            rel;
  cell_meta_t      rel_meta;
  assign rel      = send && (refcnt[send_addr] == (LW + 1)'(1));
  assign rel_meta = meta[send_addr];

  // Admission decision (needs the departure credit to avoid collisions).
  always_comb begin
    admit = 1'b0; drop_nr = 1'b0; drop_full = 1'b0; stall = 1'b0;
    if (in_any) begin
      if (!tt_e.valid || mask_l == '0)       drop_nr = 1'b1;
      else if (fl_empty)                     drop_full = 1'b1;
      else if (!sel_bp && fl_count <= bp_room) drop_full = 1'b1;
      else                                   admit = 1'b1;
      // A dropped back-pressured cell still returns its credit; if that would
      // meet a departure credit on the same link, try again next cycle.
      if ((drop_nr || drop_full) && sel_bp && rel && rel_meta.bp_in &&
          rel_meta.in_link == in_sel) begin
        stall = 1'b1; drop_nr = 1'b0; drop_full = 1'b0;
      end
    end
  end
  assign drop_credit = (drop_nr || drop_full) && sel_bp;

  // Slots kept free for credit-controlled cells: the part of the reserve
  // (the sum of the pools granted to upstream neighbours) not yet in use.
  assign bp_room = (cfg_bp_reserve > bp_cells) ? cfg_bp_reserve - bp_cells : '0;
  assign in_take     = admit || drop_nr || drop_full;

  // ------------------------------------------------------------- blocks
  free_list #(.N(N_CELLS)) u_fl (
    .clk, .rst_n,
    .alloc(admit), .alloc_addr(fl_addr), .empty(fl_empty),
    .free_valid(rel), .free_addr(send_addr), .free_count(fl_count));

  atm_cell_t rd_cell;
  cell_buffer #(.N(N_CELLS), .WIDTH(CELL_W)) u_buf (
    .clk,
    .wr_en(admit), .wr_addr(fl_addr), .wr_data({new_hdr, sel_cell.payload}),
    .rd_en(send), .rd_addr(send_addr), .rd_data(rd_cell));

  queue_manager #(.OUTS(N_LINKS), .CLS(N_CLASSES), .N(N_CELLS)) u_qm (
    .clk, .rst_n,
    .enq_valid(admit), .enq_mask(mask_l), .enq_cls(tt_e.cls), .enq_addr(fl_addr),
    .deq_valid(deq), .deq_out(out_port), .deq_cls(deq_cls),
    .head(q_head), .nonempty(q_ne));

  creditless_cell_list #(.ENTRIES(N_CELLS), .OUTS(N_LINKS), .FGW(FG_W), .N(N_CELLS)) u_ccl (
    .clk, .rst_n,
    .ins_valid(move), .ins_out(out_port), .ins_low(deq_cls == CLS_LOW),
    .ins_fg(head_fg), .ins_addr(send_addr), .full(ccl_full),
    .srch_out(out_port), .srch_fg_ok(fg_ok),
    .hit(ccl_hit), .hit_low(), .hit_fg(ccl_hit_fg), .hit_addr(ccl_hit_addr),
    .take(take_ccl), .count(ccl_occupancy));

  credit_table #(.OUTS(N_LINKS), .LINKS(N_LINKS), .FGW(FG_W), .PW(OW)) u_ct (
    .clk, .rst_n,
    .load(cfg_pool_load), .pool_init(cfg_pool_init),
    .consume(consume), .consume_out(out_port), .consume_fg(send_fg),
    .cr_valid(cr_in_valid), .cr_port(leader), .cr_fg(cr_in_fg),
    .fg_cr(fg_cr), .pool_cr(pool_cr));

  load_monitor #(.NV(N_VBUF), .OW(OW), .CTW(32)) u_mon (
    .clk, .rst_n, .clear(mon_clear),
    .vb_size(mon_size), .vb_period(mon_period),
    .arrive_valid(in_take && tt_e.valid && tt_e.mon_en && !stall), .arrive_grp(tt_e.mon_grp),
    .occupancy(mon_occupancy), .arrivals(mon_arrivals), .losses(mon_losses));

  // ------------------------------------------------------------- state
  logic [N_LINKS-1:0] overrun;   // a cell arrives on a still-occupied register

  always_comb
    for (int j = 0; j < N_LINKS; j++)
      overrun[j] = in_valid[j] && hold_v[j] && !(in_take && in_sel == LW'(j));

  always_ff @(posedge clk) begin
    if (admit) begin
      meta[fl_addr] <= '{in_link: in_sel, in_fg: sel_cell.hdr.vci[FG_W-1:0],
                         bp_in: sel_bp, out_fg: tt_e.new_vci[FG_W-1:0]};
      refcnt[fl_addr] <= (LW + 1)'($countones(mask_l));
    end
    if (send) refcnt[send_addr] <= refcnt[send_addr] - (LW + 1)'(1);
  end

  logic      [N_LINKS-1:0] sent_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_v          <= '0;
      bp_cells        <= '0;
      hold_cell       <= '0;
      in_rr           <= '0;
      out_rr          <= '0;
      tx_cnt          <= '0;
      ccl_per_out     <= '0;
      sent_q          <= '0;
      cr_out_valid    <= '0;
      cr_out_fg       <= '0;
      st_cells_in     <= '0;
      st_cells_out    <= '0;
      st_drop_noroute <= '0;
      st_drop_full    <= '0;
      st_drop_overrun <= '0;
      st_efci         <= '0;
      st_ccl_moves    <= '0;
      st_stalls       <= '0;
    end else begin
      // Input registers: a cell arriving on a full register is lost.
      st_drop_overrun <= st_drop_overrun + 32'($countones(overrun));
      for (int j = 0; j < N_LINKS; j++) begin
        logic taken;
        taken = in_take && in_sel == LW'(j);
        if (in_valid[j]) begin
          if (!overrun[j]) begin
            hold_v[j]    <= 1'b1;
            hold_cell[j] <= in_cell[j];
          end
        end else if (taken) begin
          hold_v[j] <= 1'b0;
        end
      end
      if (in_take) in_rr <= in_sel + LW'(1);

      bp_cells <= bp_cells + OW'(admit && sel_bp) - OW'(rel && rel_meta.bp_in);
      st_cells_in     <= st_cells_in     + 32'(admit);
      st_drop_noroute <= st_drop_noroute + 32'(drop_nr);
      st_drop_full    <= st_drop_full    + 32'(drop_full);
      st_efci         <= st_efci         + 32'(admit && efci_mark);
      st_ccl_moves    <= st_ccl_moves    + 32'(move);
      st_stalls       <= st_stalls       + 32'(stall);
      st_cells_out    <= st_cells_out    + 32'(send);

      // Output links: busy for one cell time after each cell.
      for (int k = 0; k < N_LINKS; k++)
        if (tx_cnt[k] != '0) tx_cnt[k] <= tx_cnt[k] - TW'(1);
      if (send) tx_cnt[out_sel] <= TW'(CYCLES_PER_CELL - 1);
      if (out_any) out_rr <= out_sel + LW'(1);
      sent_q      <= '0;
      if (send) sent_q[out_sel] <= 1'b1;

      for (int o = 0; o < N_LINKS; o++)
        ccl_per_out[o] <= ccl_per_out[o] + OW'(move && out_port == LW'(o))
                                         - OW'(take_ccl && out_port == LW'(o));

      // Credits back upstream.
      cr_out_valid <= '0;
      if (rel && rel_meta.bp_in) begin
        cr_out_valid[rel_meta.in_link] <= 1'b1;
        cr_out_fg[rel_meta.in_link]    <= rel_meta.in_fg;
      end
      if (drop_credit) begin
        cr_out_valid[in_sel] <= 1'b1;
        cr_out_fg[in_sel]    <= sel_cell.hdr.vci[FG_W-1:0];
      end
    end
  end

  // Output cell registers: buffer read data appears the cycle after the send.
  always_comb begin
    out_valid = sent_q;
    for (int k = 0; k < N_LINKS; k++) out_cell[k] = rd_cell;
  end

  assert property (@(posedge clk) disable iff (!rst_n) admit |-> !fl_empty)
    else $error("atlas_switch: admission without a free slot");
endmodule
