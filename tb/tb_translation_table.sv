// tb_translation_table: self-checking test of the translation table.
// Checks that reset leaves every entry invalid, that entries written through
// the management port come back on lookup for the right (link, VCI) pair, that
// only the low VCI bits index the table, and that clearing valid works.
module tb_translation_table;
  import atlas_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [9:0] wr_idx = 0;
  tt_entry_t wr_entry = '0, lk_entry;
  logic [3:0] lk_link = 0;
  logic [15:0] lk_vci = 0;
  tt_entry_t model [1024];
  int checks = 0, failures = 0;

  translation_table dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
    for (int i = 0; i < 1024; i += 37) begin
      lk_link = 4'(i >> 6); lk_vci = 16'(i & 63); #1;
      check(!lk_entry.valid, "invalid after reset");
    end
    @(negedge clk);
    // Write random entries to 300 random indices.
    for (int i = 0; i < 1024; i++) model[i] = '0;
    for (int n = 0; n < 300; n++) begin
      tt_entry_t e;
      int idx;
      idx = $urandom_range(0, 1023);
      e = tt_entry_t'({$urandom, $urandom});
      e.cls = svc_class_t'($urandom_range(0, 2));
      e.valid = 1'b1;
      wr_en = 1; wr_idx = 10'(idx); wr_entry = e; model[idx] = e;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 1024; i++) begin
      lk_link = 4'(i >> 6);
      lk_vci  = {10'($urandom), 6'(i & 63)};   // upper VCI bits ignored
      #1;
      check(lk_entry.valid == model[i].valid, $sformatf("valid of %0d", i));
      if (model[i].valid) check(lk_entry == model[i], $sformatf("entry %0d", i));
    end
    // Invalidate one entry.
    wr_en = 1; wr_idx = 10'd70; wr_entry = '0; @(negedge clk); wr_en = 0;
    lk_link = 1; lk_vci = 6; #1;
    check(!lk_entry.valid, "invalidated entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
