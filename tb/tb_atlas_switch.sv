// tb_atlas_switch: end-to-end test of the switch core at its default sizes.
//
// The testbench plays the upstream neighbours (it drives cells into the input
// links and collects the credits the switch returns) and the downstream
// neighbours (it takes cells from the output links and, for the link that runs
// credit flow control, returns a credit some time after each back-pressured
// cell, checking that the switch never has more cells outstanding than the pool
// or two of one flow group). Every cell carries a unique id in its payload; a
// scoreboard checks that each copy arrives on the right output (or bundle) with
// the new VPI/VCI, a correct HEC and an intact payload, in order per VC on
// plain links, and at the end that every cell was either delivered or is
// accounted for by the switch's drop counters.
//
// Phases: unicast/multicast/unroutable traffic with the load monitor watching
// one VC; priority (a top-class cell overtakes queued low-class cells); credit
// flow control on output 3 with two lanes; credits returned upstream on link 5,
// including for discarded cells; a bundled pair of links; and an overload of
// output 0 that fills the shared buffer, overruns input registers and sets
// EFCI. Each mechanism is counted and must occur at least once.
module tb_atlas_switch;
  import atlas_pkg::*;

  localparam int CPC = CELL_CYCLES;   // cycles per cell time

  logic clk = 0, rst_n = 0;
  logic      [15:0]       in_valid = '0;
  atm_cell_t [15:0]       in_cell  = '0;
  logic      [15:0]       out_valid;
  atm_cell_t [15:0]       out_cell;
  logic      [15:0]       cr_in_valid = '0;
  logic      [15:0][5:0]  cr_in_fg = '0;
  logic      [15:0]       cr_out_valid;
  logic      [15:0][5:0]  cr_out_fg;
  logic                   tt_wr = 0;
  logic [9:0]             tt_wr_idx = 0;
  tt_entry_t              tt_wr_entry = '0;
  logic      [15:0]       cfg_credit_en = '0;
  logic      [15:0][1:0]  cfg_bundle_mode = '0;
  logic                   cfg_pool_load = 0;
  logic      [15:0][8:0]  cfg_pool_init = '0;
  logic      [8:0]        cfg_efci_thresh = 9'd300;
  logic      [8:0]        cfg_bp_reserve  = 9'd32;
  logic                   mon_clear = 0;
  logic      [3:0][8:0]   mon_size = '0;
  logic      [3:0][15:0]  mon_period = '0;
  logic      [3:0][31:0]  mon_arrivals, mon_losses;
  logic      [3:0][8:0]   mon_occupancy;
  logic      [8:0]        ccl_occupancy, buf_occupancy;
  logic      [31:0]       st_cells_in, st_cells_out, st_drop_noroute, st_drop_full,
                          st_drop_overrun, st_efci, st_ccl_moves, st_stalls;

  atlas_switch dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    logic [15:0] remaining;   // leader outputs still to deliver
    int          copies;
    logic [7:0]  vpi;
    logic [15:0] vci;
    int          cls;
    int          in_link;
    logic [15:0] in_vci;
    int          t_in;
  } exp_t;
  exp_t exp [int];
  int   next_id = 1;
  int   injected = 0, delivered_ids = 0;
  int   last_id [string];

  // mechanism counters
  int n_unicast = 0, n_multicast = 0, n_overtake = 0, n_bundle_lo = 0, n_bundle_hi = 0;
  int n_credit_sent = 0, n_credit_ret_up = 0, n_efci_seen = 0, n_full_rate = 0;
  int latency_first = -1;

  function automatic logic [383:0] payload_of(int id, int link);
    logic [383:0] p;
    for (int i = 0; i < 12; i++) p[i*32 +: 32] = 32'(id * 32'h01000193 ^ (i * 32'h9E3779B9));
    p[383:352] = 32'(id);
    p[351:344] = 8'(link);
    return p;
  endfunction

  // Translation table programming.
  tt_entry_t tt_model [1024];
  task automatic tt_set(int link, int vci6, logic [15:0] mask, int cls,
                        int nvpi, int nvci, bit mon = 0, int grp = 0);
    tt_entry_t e;
    e = '{valid: 1'b1, out_mask: mask, cls: svc_class_t'(cls), new_vpi: 8'(nvpi),
          new_vci: 16'(nvci), mon_en: mon, mon_grp: 2'(grp)};
    @(negedge clk);
    tt_wr = 1; tt_wr_idx = 10'(link * 64 + vci6); tt_wr_entry = e;
    tt_model[link * 64 + vci6] = e;
    @(negedge clk);
    tt_wr = 0;
  endtask

  // Queue one cell for injection on a link in the current cycle (call between
  // a negedge and the next posedge; inject_clear() after the posedge).
  task automatic put(int link, int vpi, int vci);
    tt_entry_t e;
    int id;
    id = next_id++;
    in_valid[link] = 1'b1;
    in_cell[link].hdr = '{gfc: 4'h0, vpi: 8'(vpi), vci: 16'(vci), pti: 3'b000, clp: 1'b0,
                          hec: atm_hec({4'h0, 8'(vpi), 16'(vci), 3'b000, 1'b0})};
    in_cell[link].payload = payload_of(id, link);
    e = tt_model[link * 64 + (vci & 63)];
    exp[id] = '{remaining: e.valid ? e.out_mask : 16'h0, copies: $countones(e.out_mask),
                vpi: e.new_vpi, vci: e.new_vci, cls: int'(e.cls), in_link: link,
                in_vci: 16'(vci), t_in: cycle};
    injected++;
  endtask

  task automatic step();
    @(negedge clk);
    in_valid = '0;
  endtask

  // ------------------------------------------------------ output checking
  int down_out [64];          // downstream model of output 3: outstanding per fg
  int down_total = 0;
  int down_pool  = 2;
  int cr_due_t [$], cr_due_fg [$];
  int up_credits [16][64];    // credits received upstream, per link and fg
  bit up5_cr [64];            // upstream model of link 5: one credit per flow group
  int last_out_t [16];

  function automatic int leader_of(int k);
    int m;
    m = 1 << cfg_bundle_mode[k];
    return k & ~(m - 1);
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 16; k++) begin
      if (out_valid[k]) begin
        atm_cell_t c;
        int id, ld;
        c  = out_cell[k];
        id = int'(c.payload[383:352]);
        ld = leader_of(k);
        check(exp.exists(id), $sformatf("unknown cell id %0d on link %0d", id, k));
        if (exp.exists(id)) begin
          check(exp[id].remaining[ld], $sformatf("cell %0d not expected on link %0d", id, k));
          check(c.hdr.vpi == exp[id].vpi && c.hdr.vci == exp[id].vci, $sformatf("cell %0d VPI/VCI", id));
          check(c.hdr.hec == atm_hec({c.hdr.gfc, c.hdr.vpi, c.hdr.vci, c.hdr.pti, c.hdr.clp}),
                $sformatf("cell %0d HEC", id));
          check(c.payload == payload_of(id, exp[id].in_link), $sformatf("cell %0d payload", id));
          check(c.hdr.pti == 3'b000 || c.hdr.pti == 3'b010, "PTI");
          if (c.hdr.pti[1]) n_efci_seen++;
          if (latency_first < 0) latency_first = cycle - exp[id].t_in;
          // order per VC on links that are not bundled and not credit-controlled
          if (cfg_bundle_mode[k] == 0 && !cfg_credit_en[k]) begin
            string key;
            key = $sformatf("%0d/%0d/%0d", k, exp[id].in_link, exp[id].in_vci);
            if (last_id.exists(key)) check(id > last_id[key], $sformatf("order on %s", key));
            last_id[key] = id;
          end
          if (exp[id].copies == 1) n_unicast++; else n_multicast++;
          if (k == 14) n_bundle_lo++;
          if (k == 15) n_bundle_hi++;
          // link rate: at most one cell per cell time on a link
          if (last_out_t[k] != 0) begin
            check(cycle - last_out_t[k] >= CPC, $sformatf("link %0d faster than one cell time", k));
            if (cycle - last_out_t[k] == CPC) n_full_rate++;
          end
          last_out_t[k] = cycle;
          // downstream credit model for output 3
          if (k == 3 && cfg_credit_en[3] && exp[id].cls != 0) begin
            int fg;
            fg = int'(c.hdr.vci[5:0]);
            check(down_out[fg] == 0, $sformatf("two cells of flow group %0d downstream", fg));
            check(down_total < down_pool, "downstream pool overflow");
            down_out[fg]++; down_total++; n_credit_sent++;
            cr_due_t.push_back(cycle + 80); cr_due_fg.push_back(fg);
          end
          exp[id].remaining[ld] = 1'b0;
          if (exp[id].remaining == '0) begin
            exp.delete(id);
            delivered_ids++;
          end
        end
      end
      if (cr_out_valid[k]) begin
        if (k == 5) begin
          check(!up5_cr[cr_out_fg[k]], $sformatf("credit for flow group %0d not in use", cr_out_fg[k]));
          up5_cr[cr_out_fg[k]] = 1'b1;
        end
        up_credits[k][cr_out_fg[k]]++;
        n_credit_ret_up++;
      end
    end
    // return due credits to the switch, one per cycle
    cr_in_valid = '0;
    if (cr_due_t.size() != 0 && cr_due_t[0] <= cycle) begin
      cr_in_valid[3] = 1'b1; cr_in_fg[3] = 6'(cr_due_fg[0]);
      down_out[cr_due_fg[0]]--; down_total--;
      void'(cr_due_t.pop_front()); void'(cr_due_fg.pop_front());
    end
  end

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- stimulus
  int sent_link5 [64];
  int prio_lo_ids [$];
  int prio_hi_id;
  int bp_ids [$];

  initial begin
    for (int i = 0; i < 1024; i++) tt_model[i] = '0;
    for (int i = 0; i < 16; i++) last_out_t[i] = 0;
    for (int f = 0; f < 64; f++) begin down_out[f] = 0; sent_link5[f] = 0; up5_cr[f] = 1; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Configuration.
    cfg_credit_en = 16'b0000_0000_0010_1000;      // links 3 and 5
    cfg_bundle_mode[14] = 2'd1; cfg_bundle_mode[15] = 2'd1;
    for (int o = 0; o < 16; o++) cfg_pool_init[o] = 9'd2;
    mon_size[0] = 9'd1; mon_period[0] = 16'd1000;
    mon_size[1] = 9'd64; mon_period[1] = 16'd2;
    @(negedge clk) cfg_pool_load = 1;
    @(negedge clk) cfg_pool_load = 0;

    for (int l = 0; l < 3; l++) begin
      tt_set(l, 1, 16'(1) << (l + 1), 0, 8'h40 + l, 16'h0100 + l, 1, 0);
      tt_set(l, 2, 16'h0700, 1, 8'h50, 16'h0200, 1, 1);   // multicast to 8, 9, 10
    end
    tt_set(0, 4, 16'h0080, 2, 8'h60, 16'h0300);        // low class to 7
    tt_set(1, 5, 16'h0080, 0, 8'h61, 16'h0301);        // top class to 7
    for (int v = 8; v < 12; v++) tt_set(2, v, 16'h0008, 1, 8'h70, 16'h0400 + v);  // fg v on 3
    tt_set(2, 12, 16'h0008, 2, 8'h71, 16'h0400 + 72);  // low class, flow group 8 again
    tt_set(2, 13, 16'h0008, 0, 8'h72, 16'h0400 + 13);  // top class to 3
    tt_set(5, 1, 16'h0040, 1, 8'h80, 16'h0500);        // link 5 -> 6, back-pressured in
    tt_set(5, 3, 16'h0000, 1, 8'h81, 16'h0501);        // link 5: discarded, credit returned
    tt_set(0, 6, 16'h4000, 0, 8'h90, 16'h0600);        // to the bundle 14+15
    for (int l = 0; l < 16; l++) if (l != 3 && l != 5) tt_set(l, 7, 16'h0001, 2, 8'hA0, 16'h0700 + l);

    // Phase 1: single cell for latency, then mixed traffic.
    @(negedge clk);
    put(0, 0, 1); step();
    repeat (10) step();
    check(latency_first >= 0 && latency_first * 20 < 1000,
          $sformatf("cut-through latency %0d cycles under 1 us at 50 MHz", latency_first));
    check(latency_first == 3, $sformatf("latency %0d cycles from input link to output link", latency_first));
    for (int n = 0; n < 60; n++) begin
      int l, v;
      l = $urandom_range(0, 2);
      v = (n % 5 == 4) ? 3 : ((n % 3 == 0) ? 2 : 1);  // vci 3 has no entry
      put(l, 0, v);
      step(); step();
    end

    // Phase 2: priority on output 7.
    for (int n = 0; n < 6; n++) begin prio_lo_ids.push_back(next_id); put(0, 0, 4); step(); end
    prio_hi_id = next_id; put(1, 0, 5); step();

    // Phase 3: credit flow control on output 3 (pool of 2 lanes).
    for (int n = 0; n < 24; n++) begin
      put(2, 0, (n % 7 == 6) ? 13 : ((n % 5 == 4) ? 12 : 8 + (n % 4)));
      step(); step(); step();
    end

    // Phase 4: back-pressured input link 5, with discarded cells.
    // The upstream side obeys the protocol: one cell per flow group in flight.
    // First, pairs timed so that a discarded cell's credit meets the departure
    // credit of the cell sent just before it (the input must retry).
    for (int n = 0; n < 10; n++) begin
      while (!up5_cr[1] || !up5_cr[3]) step();
      put(5, 0, 1); up5_cr[1] = 1'b0; sent_link5[1]++; step();
      put(5, 0, 3); up5_cr[3] = 1'b0; sent_link5[3]++; step();
    end
    for (int n = 0; n < 300; n++) begin
      int v;
      v = $urandom_range(0, 1) ? 3 : 1;
      while (!up5_cr[v]) step();
      put(5, 0, v);
      up5_cr[v] = 1'b0;
      sent_link5[v]++;
      repeat ($urandom_range(1, 3)) step();
    end
    check(st_drop_overrun == 0, "no overrun before the overload phase");

    // Phase 5: bundled pair 14+15.
    for (int n = 0; n < 12; n++) begin put(0, 0, 6); step(); end

    // Phase 6: overload output 0 from 14 links: buffer fills, inputs overrun,
    // EFCI marks cells admitted above the threshold.
    // Link 5 keeps sending credit-controlled cells into the full buffer; the
    // reserve must let every one of them in.
    cfg_efci_thresh = 9'd200;
    for (int n = 0; n < 330; n++) begin
      for (int l = 0; l < 16; l++) if (l != 3 && l != 5 && (n + l) % 2 == 0) put(l, 0, 7);
      if (n % 40 == 39 && up5_cr[1]) begin
        bp_ids.push_back(next_id); put(5, 0, 1); up5_cr[1] = 1'b0; sent_link5[1]++;
      end
      step();
    end

    // Drain.
    $display("overload ends at cycle %0d with %0d cells buffered", cycle, buf_occupancy);
    while (buf_occupancy != 0 || ccl_occupancy != 0 || cr_due_t.size() != 0) step();
    $display("drained at cycle %0d", cycle);
    repeat (200) step();

    // ------------------------------------------------------- final checks
    check(exp.size() + delivered_ids == injected, "scoreboard bookkeeping");
    check(injected - delivered_ids == int'(st_drop_noroute + st_drop_full + st_drop_overrun),
          $sformatf("undelivered %0d = drops %0d+%0d+%0d", injected - delivered_ids,
                    st_drop_noroute, st_drop_full, st_drop_overrun));
    check(st_cells_in == 32'(delivered_ids), "admitted cells all delivered");
    check(n_efci_seen == int'(st_efci), "EFCI marks seen = counted");
    check(up_credits[5][1] == sent_link5[1] && up_credits[5][3] == sent_link5[3],
          $sformatf("credits upstream on link 5: %0d/%0d of %0d/%0d", up_credits[5][1],
                    up_credits[5][3], sent_link5[1], sent_link5[3]));
    check(down_total == 0, "all downstream credits returned");
    check(mon_arrivals[0] > 0 && mon_losses[0] > 0, "load monitor counted losses on the small buffer");
    check(mon_losses[1] == 0 && mon_arrivals[1] > 0, "no losses on the large simulated buffer");

    begin
      int lost;
      lost = 0;
      foreach (bp_ids[i]) if (exp.exists(bp_ids[i])) lost++;
      check(bp_ids.size() > 4 && lost == 0,
            $sformatf("credit-controlled cells during overload: %0d of %0d lost", lost, bp_ids.size()));
    end

    // mechanisms
    check(n_unicast > 0,        "unicast happened");
    check(n_multicast > 0,      "multicast happened");
    check(n_overtake > 0,       "priority overtake happened");
    check(st_drop_noroute > 0,  "unroutable drop happened");
    check(st_drop_full > 0,     "buffer-full drop happened");
    check(st_drop_overrun > 0,  "input overrun happened");
    check(st_efci > 0,          "EFCI marking happened");
    check(st_ccl_moves > 0,     "creditless-list move happened");
    check(st_stalls > 0,        "input stall happened");
    check(n_credit_sent > 0,    "credit-controlled departures happened");
    check(n_credit_ret_up > 0,  "credits returned upstream");
    check(n_bundle_lo > 0 && n_bundle_hi > 0, "both links of the bundle used");
    check(n_full_rate > 0,      "back-to-back cells at full link rate");
    $display("mechanisms: unicast=%0d multicast=%0d overtake=%0d noroute=%0d full=%0d overrun=%0d efci=%0d ccl_moves=%0d stalls=%0d credit_sent=%0d credits_up=%0d bundle=%0d/%0d full_rate=%0d latency=%0d",
             n_unicast, n_multicast, n_overtake, st_drop_noroute, st_drop_full, st_drop_overrun,
             st_efci, st_ccl_moves, st_stalls, n_credit_sent, n_credit_ret_up, n_bundle_lo,
             n_bundle_hi, n_full_rate, latency_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Priority: the top-class cell must leave before some of the low-class cells
  // queued ahead of it on output 7.
  always @(negedge clk) if (rst_n && out_valid[7]) begin
    int id;
    id = int'(out_cell[7].payload[383:352]);
    if (id == prio_hi_id)
      foreach (prio_lo_ids[i]) if (exp.exists(prio_lo_ids[i])) n_overtake++;
  end
endmodule
