// tb_credit_table: self-checking test of the pool and flow-group credits.
// Checks reset and load values, that a departure clears the flow group's
// credit and decrements the pool, that a returned credit restores both, that
// several credits for one port in the same cycle (a bundle) all count, and a
// long random run of departures and returns against a reference model that
// follows the protocol (a cell leaves only with fgCr = 1 and poolCr > 0).
module tb_credit_table;
  localparam int OUTS = 16, LINKS = 16, FGW = 6, PW = 9;
  logic clk = 0, rst_n = 0;
  logic load = 0, consume = 0;
  logic [OUTS-1:0][PW-1:0] pool_init = '0;
  logic [3:0] consume_out = 0;
  logic [5:0] consume_fg = 0;
  logic [LINKS-1:0] cr_valid = 0;
  logic [LINKS-1:0][3:0] cr_port = '0;
  logic [LINKS-1:0][5:0] cr_fg = '0;
  logic [OUTS-1:0][63:0] fg_cr;
  logic [OUTS-1:0][PW-1:0] pool_cr;

  bit mfg [OUTS][64];
  int mpool [OUTS];
  int out_fg [$], out_port [$];   // credits in flight back from downstream
  int checks = 0, failures = 0;

  credit_table #(.OUTS(OUTS), .LINKS(LINKS), .FGW(FGW), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string what);
    for (int o = 0; o < OUTS; o++) begin
      check(pool_cr[o] == PW'(mpool[o]), $sformatf("%s: pool %0d = %0d", what, o, pool_cr[o]));
      for (int f = 0; f < 64; f++) if (fg_cr[o][f] != mfg[o][f]) begin
        check(0, $sformatf("%s: fgCr[%0d][%0d]", what, o, f));
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    check(fg_cr == '1 && pool_cr == '0, "reset: fg credits 1, pools 0");
    for (int o = 0; o < OUTS; o++) begin pool_init[o] = PW'(4 + o % 5); mpool[o] = 4 + o % 5; end
    for (int o = 0; o < OUTS; o++) for (int f = 0; f < 64; f++) mfg[o][f] = 1;
    load = 1; @(negedge clk); load = 0;
    compare("after load");
    // Directed: send fg 9 on output 3.
    consume = 1; consume_out = 3; consume_fg = 9; @(negedge clk); consume = 0;
    mfg[3][9] = 0; mpool[3]--;
    compare("after one departure");
    // Directed: two credits for port 3 in one cycle (bundled links 2 and 3).
    consume = 1; consume_fg = 10; @(negedge clk); consume = 0;
    mfg[3][10] = 0; mpool[3]--;
    cr_valid = 16'b1100; cr_port[2] = 3; cr_port[3] = 3; cr_fg[2] = 9; cr_fg[3] = 10;
    @(negedge clk); cr_valid = 0;
    mfg[3][9] = 1; mfg[3][10] = 1; mpool[3] += 2;
    compare("after two credits in one cycle");
    // Random protocol run.
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int o, f;
      consume = 0; cr_valid = 0;
      o = $urandom_range(0, OUTS - 1); f = $urandom_range(0, 63);
      if (mfg[o][f] && mpool[o] > 0 && $urandom_range(0, 1)) begin
        consume = 1; consume_out = 4'(o); consume_fg = 6'(f);
      end
      // return up to 4 credits, on distinct links, for distinct (port, fg)
      for (int j = 0; j < 4 && out_fg.size() > 0; j++)
        if ($urandom_range(0, 2) == 0) begin
          cr_valid[j] = 1; cr_port[j] = 4'(out_port[0]); cr_fg[j] = 6'(out_fg[0]);
          mfg[out_port[0]][out_fg[0]] = 1; mpool[out_port[0]]++;
          void'(out_port.pop_front()); void'(out_fg.pop_front());
        end
      if (consume) begin
        mfg[o][f] = 0; mpool[o]--;
        out_port.push_back(o); out_fg.push_back(f);
      end
      @(negedge clk);
      if (cyc % 16 == 0) compare("random");
    end
    consume = 0; cr_valid = 0;
    compare("end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
