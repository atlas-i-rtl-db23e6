// tb_creditless_cell_list: self-checking test of the creditless cell list.
// A reference model holds the waiting cells. Random inserts, searches with
// random flow-group credit sets and takes run for many cycles; each search
// result (hit, class, flow group, address) is compared with the model's
// answer: a waiting cell of the searched output whose flow group has credit,
// middle class before low class. Filling the list checks the full flag.
module tb_creditless_cell_list;
  localparam int E = 32, OUTS = 16, FGW = 6, N = 256;
  logic clk = 0, rst_n = 0;
  logic ins_valid = 0, ins_low = 0, take = 0;
  logic [3:0] ins_out = 0, srch_out = 0;
  logic [5:0] ins_fg = 0, hit_fg;
  logic [7:0] ins_addr = 0, hit_addr;
  logic full, hit, hit_low;
  logic [63:0] srch_fg_ok = 0;
  logic [5:0] count;

  typedef struct { int out; bit low; int fg; int addr; } ent_t;
  ent_t m [$];
  int checks = 0, failures = 0, hits = 0, misses = 0, next_addr = 0;

  creditless_cell_list #(.ENTRIES(E), .OUTS(OUTS), .FGW(FGW), .N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit exp_hit, exp_low;
      int idx;
      @(negedge clk);
      check(count == 6'(m.size()), "count");
      check(full == (m.size() == E), "full flag");
      // search
      srch_out = 4'($urandom_range(0, 3));
      srch_fg_ok = {$urandom, $urandom} & {$urandom, $urandom};
      #1;
      exp_hit = 0; exp_low = 1; idx = -1;
      foreach (m[i])
        if (m[i].out == srch_out && srch_fg_ok[m[i].fg]) begin
          if (!exp_hit || (exp_low && !m[i].low)) begin
            exp_hit = 1; exp_low = m[i].low; idx = i;
          end
        end
      check(hit == exp_hit, "hit");
      if (exp_hit) begin
        bit found;
        hits++;
        check(hit_low == exp_low, "class priority");
        check(srch_fg_ok[hit_fg] && hit_fg <= 63, "hit flow group has credit");
        // the hit must be one of the model's eligible entries of that class
        found = 0;
        foreach (m[i])
          if (m[i].addr == hit_addr && m[i].out == srch_out && m[i].low == hit_low &&
              m[i].fg == hit_fg) begin found = 1; idx = i; end
        check(found, "hit matches a waiting cell");
      end else misses++;
      take = exp_hit && ($urandom_range(0, 1) == 1);
      ins_valid = (m.size() < E) && ($urandom_range(0, 99) < (cyc < 3000 ? 70 : 40));
      ins_out = 4'($urandom_range(0, 3)); ins_low = 1'($urandom);
      ins_fg = 6'($urandom); ins_addr = 8'(next_addr);
      if (take) m.delete(idx);
      if (ins_valid) begin
        m.push_back('{out: ins_out, low: ins_low, fg: ins_fg, addr: next_addr});
        next_addr = (next_addr + 1) % N;
      end
    end
    @(negedge clk);
    ins_valid = 0; take = 0;
    check(hits > 500 && misses > 100, "stimulus produced hits and misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
