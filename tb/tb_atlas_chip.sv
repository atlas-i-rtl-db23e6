// tb_atlas_chip: end-to-end test of the switch with character-level links, at
// the default sizes.
//
// The testbench talks to the chip only through link characters, as the
// neighbouring switches would. A sender per link serialises cells (begin-of-
// cell character and 53 bytes) and credits (credit character and flow-group
// byte); a credit is slipped in ahead of the rest of whatever is being sent, so
// credits land inside cells. A decoder per link, written independently of the
// chip's receiver, rebuilds cells and credits from the chip's output
// characters and counts credits that arrived inside a cell.
//
// Traffic: link 0 sends back-pressured low-class cells on four flow groups to
// output 2, obeying the credits the chip returns (one cell per flow group in
// flight); link 2 sends back-pressured cells to output 5, obeying credits too;
// link 1 sends middle-class cells multicast to outputs 4 and 2; link 3 sends
// top-class cells to output 6. Output 2 runs credit flow control with a pool
// of 2; the downstream model returns each credit 100 clocks after the cell on
// link 2's input stream, which is busy with link 2's own cells. Finally a
// broken cell is sent on link 9 and must be reported.
//
// Checks: every cell arrives whole, on the right links, with the new header
// and a valid HEC; the downstream pool and flow-group limits are never
// exceeded; every back-pressured cell returns exactly one credit upstream on
// its own link with its flow group; the latency of a cell through an idle
// switch is under one microsecond (50 clocks at 50 MHz) from its last byte in
// to its first character out. Mechanisms counted and required: multicast
// copies, credits inserted inside outgoing cells, credits extracted from
// inside incoming cells, moves into the creditless list, credit-gated
// departures, and the link error report.
module tb_atlas_chip;
  import atlas_pkg::*;

  logic clk = 0, rst_n = 0;
  link_char_t [15:0] rx_ch;
  link_char_t [15:0] tx_ch;
  logic      [31:0]       st_link_errors;
  logic                   tt_wr = 0;
  logic [9:0]             tt_wr_idx = 0;
  tt_entry_t              tt_wr_entry = '0;
  logic      [15:0]       cfg_credit_en = '0;
  logic      [15:0][1:0]  cfg_bundle_mode = '0;
  logic                   cfg_pool_load = 0;
  logic      [15:0][8:0]  cfg_pool_init = '0;
  logic      [8:0]        cfg_efci_thresh = 9'd300;
  logic      [8:0]        cfg_bp_reserve  = 9'd16;
  logic                   mon_clear = 0;
  logic      [3:0][8:0]   mon_size = '0;
  logic      [3:0][15:0]  mon_period = '0;
  logic      [3:0][31:0]  mon_arrivals, mon_losses;
  logic      [3:0][8:0]   mon_occupancy;
  logic      [8:0]        ccl_occupancy, buf_occupancy;
  logic      [31:0]       st_cells_in, st_cells_out, st_drop_noroute, st_drop_full,
                          st_drop_overrun, st_efci, st_ccl_moves, st_stalls;

  atlas_chip dut (.*);

  always #10 clk = ~clk;     // 50 MHz
  int cycle = 0;
  always @(posedge clk) cycle++;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ senders
  link_char_t txq [16][$];
  int sent_last_byte_t [16];
  always @(negedge clk) begin
    for (int j = 0; j < 16; j++) begin
      if (rst_n && txq[j].size() > 0) begin
        rx_ch[j] = txq[j].pop_front();
        if (txq[j].size() == 0 && !rx_ch[j].ctrl) sent_last_byte_t[j] = cycle;
      end else rx_ch[j] = '{ctrl: 1'b1, data: CH_IDLE};
    end
  end

  int n_cr_into_cells = 0;
  function automatic void send_cell(int j, atm_cell_t c);
    txq[j].push_back('{ctrl: 1'b1, data: CH_BOC});
    for (int b = 0; b < CELL_BYTES; b++)
      txq[j].push_back('{ctrl: 1'b0, data: c[CELL_W - 8*b - 1 -: 8]});
  endfunction
  function automatic void send_credit(int j, int fg);
    if (txq[j].size() > 0 && !txq[j][0].ctrl) n_cr_into_cells++;
    txq[j].push_front('{ctrl: 1'b0, data: 8'(fg)});
    txq[j].push_front('{ctrl: 1'b1, data: CH_CREDIT});
  endfunction

  // ----------------------------------------------------------- scoreboard
  typedef struct {
    logic [15:0] remaining;
    logic [7:0]  vpi;
    logic [15:0] vci;
    int          in_link;
    int          cls;
    int          copies;
  } exp_t;
  exp_t exp [int];
  tt_entry_t tt_model [1024];
  int next_id = 1;

  function automatic logic [383:0] payload_of(int id);
    logic [383:0] p;
    for (int i = 0; i < 12; i++) p[i*32 +: 32] = 32'(id * 32'h01000193 ^ (i * 32'h85EBCA6B));
    p[383:352] = 32'(id);
    return p;
  endfunction

  task automatic tt_set(int link, int vci6, logic [15:0] mask, int cls, int nvpi, int nvci);
    tt_entry_t e;
    e = '{valid: 1'b1, out_mask: mask, cls: svc_class_t'(cls), new_vpi: 8'(nvpi),
          new_vci: 16'(nvci), mon_en: 1'b0, mon_grp: 2'd0};
    @(negedge clk);
    tt_wr = 1; tt_wr_idx = 10'(link * 64 + vci6); tt_wr_entry = e;
    tt_model[link * 64 + vci6] = e;
    @(negedge clk);
    tt_wr = 0;
  endtask

  function automatic void put(int link, int vci);
    atm_cell_t c;
    tt_entry_t e;
    int id = next_id++;
    c.hdr = '{gfc: 4'h0, vpi: 8'd9, vci: 16'(vci), pti: 3'b000, clp: 1'b0,
              hec: atm_hec({4'h0, 8'd9, 16'(vci), 3'b000, 1'b0})};
    c.payload = payload_of(id);
    e = tt_model[link * 64 + (vci & 63)];
    exp[id] = '{remaining: e.out_mask, vpi: e.new_vpi, vci: e.new_vci, in_link: link,
                cls: int'(e.cls), copies: $countones(e.out_mask)};
    send_cell(link, c);
  endfunction

  // ------------------------------------------------------------ decoders
  bit in_cell [16], want_fg [16];
  int nbytes [16];
  logic [CELL_W-1:0] acc [16];
  int n_cr_in_cells = 0, n_multicast = 0, n_delivered = 0, n_down_credit = 0;
  int up_cr [16][64];            // credits received upstream, per link and fg
  bit up_busy [16][64];          // upstream model: flow group has a cell in flight
  int down_out [64], down_total = 0;
  int due_t [$], due_fg [$];
  int first_boc_t [16];
  localparam int DOWN_POOL = 2;

  task automatic got_cell(int k, atm_cell_t c);
    int id = int'(c.payload[383:352]);
    check(exp.exists(id), $sformatf("unknown cell %0d on link %0d", id, k));
    if (!exp.exists(id)) return;
    check(exp[id].remaining[k], $sformatf("cell %0d not expected on link %0d", id, k));
    check(c.hdr.vpi == exp[id].vpi && c.hdr.vci == exp[id].vci, "new VPI/VCI");
    check(c.hdr.hec == atm_hec({c.hdr.gfc, c.hdr.vpi, c.hdr.vci, c.hdr.pti, c.hdr.clp}), "HEC");
    check(c.payload == payload_of(id), "payload");
    if (exp[id].copies > 1) n_multicast++;
    if (k == 2 && exp[id].cls != 0) begin          // downstream of output 2
      int fg = int'(c.hdr.vci[5:0]);
      check(down_out[fg] == 0, "two cells of one flow group downstream");
      check(down_total < DOWN_POOL, "downstream pool exceeded");
      down_out[fg]++; down_total++;
      due_t.push_back(cycle + 100); due_fg.push_back(fg);
    end
    exp[id].remaining[k] = 1'b0;
    if (exp[id].remaining == '0) begin exp.delete(id); n_delivered++; end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 16; k++) begin
      link_char_t ch;
      int fg;
      ch = tx_ch[k];
      if (ch.ctrl) begin
        check(!want_fg[k], "control character where a flow group was due");
        if (ch.data == CH_BOC) begin
          check(!in_cell[k], "cell cut short");
          in_cell[k] = 1; nbytes[k] = 0;
          if (first_boc_t[k] == 0) first_boc_t[k] = cycle;
        end else if (ch.data == CH_CREDIT) begin
          want_fg[k] = 1;
          if (in_cell[k]) n_cr_in_cells++;
        end else check(ch.data == CH_IDLE && !in_cell[k], "idle inside a cell");
      end else if (want_fg[k]) begin
        fg = int'(ch.data);
        want_fg[k] = 0;
        up_cr[k][fg]++;
        check(up_busy[k][fg], $sformatf("credit on link %0d for idle flow group %0d", k, fg));
        up_busy[k][fg] = 0;
      end else begin
        check(in_cell[k] == 1, "data byte outside a cell");
        acc[k] = {acc[k][CELL_W-9:0], ch.data};
        if (++nbytes[k] == CELL_BYTES) begin
          in_cell[k] = 0;
          got_cell(k, atm_cell_t'(acc[k]));
        end
      end
    end
    // downstream of output 2 returns credits, into link 2's input stream
    while (due_t.size() > 0 && due_t[0] <= cycle) begin
      send_credit(2, due_fg[0]);
      down_out[due_fg[0]]--; down_total--; n_down_credit++;
      void'(due_t.pop_front()); void'(due_fg.pop_front());
    end
  end

  // Credit-obeying upstream senders: one cell per flow group in flight.
  task automatic upstream(int link, int n, int vci0, int nfg);
    int k = 0;
    while (k < n) begin
      int fg = vci0 + k % nfg;
      if (!up_busy[link][fg] && txq[link].size() < 60) begin
        up_busy[link][fg] = 1;
        put(link, fg);
        k++;
      end
      @(negedge clk);
    end
  endtask

  int lat;
  initial begin
    for (int j = 0; j < 16; j++) rx_ch[j] = '{ctrl: 1'b1, data: CH_IDLE};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = 1; v <= 4; v++) tt_set(0, v, 16'h0004, 2, 20, v);    // low, to output 2
    tt_set(1, 8, 16'h0014, 1, 21, 8);                                  // middle, to 4 and 2
    for (int v = 1; v <= 4; v++) tt_set(2, v, 16'h0020, 2, 22, 16 + v);  // low, to output 5
    tt_set(3, 9, 16'h0040, 0, 23, 9);                                  // top, to output 6
    cfg_credit_en = 16'h0005;        // links 0 and 2: inputs obey credits, output 2 gated
    cfg_pool_init[2] = 9'(DOWN_POOL);
    @(negedge clk) cfg_pool_load = 1;
    @(negedge clk) cfg_pool_load = 0;

    // Latency through an idle switch.
    put(3, 9);
    wait (first_boc_t[6] != 0);
    lat = first_boc_t[6] - sent_last_byte_t[3];
    $display("latency: %0d clocks from last byte in to first character out", lat);
    check(lat > 0 && lat < 50, "latency under one microsecond");
    repeat (100) @(negedge clk);

    fork
      upstream(0, 40, 1, 4);
      upstream(2, 30, 1, 4);
      begin
        for (int i = 0; i < 20; i++) begin put(1, 8); repeat (70) @(negedge clk); end
      end
      begin
        for (int i = 0; i < 20; i++) begin put(3, 9); repeat (90) @(negedge clk); end
      end
    join
    // drain
    repeat (6000) begin
      @(negedge clk);
      if (exp.size() == 0 && due_t.size() == 0 && buf_occupancy == 0) break;
    end
    repeat (200) @(negedge clk);
    check(exp.size() == 0, $sformatf("%0d cells not delivered", exp.size()));
    for (int fg = 1; fg <= 4; fg++) begin
      check(up_cr[0][fg] == 10, $sformatf("link 0 flow group %0d: %0d credits", fg, up_cr[0][fg]));
    end
    check(up_cr[2][1] + up_cr[2][2] + up_cr[2][3] + up_cr[2][4] == 30, "link 2 credits");
    check(st_drop_noroute == 0 && st_drop_full == 0 && st_drop_overrun == 0, "no drops");
    check(st_link_errors == 0, "no link errors in normal traffic");

    // A cell cut short by the next one must be reported.
    txq[9].push_back('{ctrl: 1'b1, data: CH_BOC});
    for (int b = 0; b < 10; b++) txq[9].push_back('{ctrl: 1'b0, data: 8'(b)});
    txq[9].push_back('{ctrl: 1'b1, data: CH_BOC});
    repeat (40) @(negedge clk);
    check(st_link_errors == 1, "broken cell reported");

    $display("delivered=%0d multicast_copies=%0d credits_up_inside_cells=%0d",
             n_delivered, n_multicast, n_cr_in_cells);
    $display("credits_into_incoming_cells=%0d downstream_credits=%0d ccl_moves=%0d cells_out=%0d",
             n_cr_into_cells, n_down_credit, st_ccl_moves, st_cells_out);
    check(n_delivered == 111, "all cells delivered");
    check(n_multicast >= 40, "multicast copies seen");
    check(n_cr_in_cells > 0, "credit inserted inside an outgoing cell");
    check(n_cr_into_cells > 0, "credit extracted from inside an incoming cell");
    check(n_down_credit >= 60, "credit-gated departures on output 2");
    check(st_ccl_moves > 0, "cells moved to the creditless list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
