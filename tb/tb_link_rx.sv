// tb_link_rx: self-checking test of the link receiver.
// The testbench builds a character stream itself: random cells with credits
// mixed in at random places (also between the bytes of a cell), idle
// characters, and now and then a broken cell (cut short by a new
// begin-of-cell) or a stray data byte. It checks that every whole cell comes
// out once, intact and in order, one cycle after its last byte; that every
// credit comes out with its flow group one cycle after its flow-group byte;
// that broken cells never come out; and that each broken cell and stray byte
// is reported on err.
module tb_link_rx;
  import atlas_pkg::*;
  logic clk = 0, rst_n = 0;
  link_char_t ch = '{ctrl: 1'b1, data: CH_IDLE};
  logic cell_valid, cr_valid, err;
  atm_cell_t cell_data;
  logic [FG_W-1:0] cr_fg;

  int checks = 0, failures = 0;
  int n_cells = 0, n_credits = 0, n_errs = 0, exp_errs = 0;

  link_rx dut (.*);
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

  always @(posedge clk) if (rst_n && err) n_errs++;

  // Send one character and check the outputs it causes one cycle later.
  task automatic put(input bit c, input logic [7:0] d, input bit exp_cell,
                     input atm_cell_t cell_exp, input bit exp_cr, input int fg_exp);
    ch = '{ctrl: c, data: d};
    @(negedge clk);
    check(cell_valid == exp_cell, "cell_valid timing");
    if (exp_cell && cell_valid) check(cell_data == cell_exp, "cell contents");
    check(cr_valid == exp_cr, "cr_valid timing");
    if (exp_cr && cr_valid) check(int'(cr_fg) == fg_exp, "credit flow group");
  endtask

  task automatic maybe_credit();
    if ($urandom_range(0, 9) == 0) begin
      int f = $urandom_range(0, (1 << FG_W) - 1);
      put(1, CH_CREDIT, 0, '0, 0, 0);
      put(0, 8'(f), 0, '0, 1, f);
      n_credits++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      atm_cell_t c;
      int cut;
      static int prev_whole = 1;
      for (int w = 0; w < CELL_W / 32 + 1; w++) c = {c, 32'($urandom)};
      repeat ($urandom_range(0, 3)) put(1, CH_IDLE, 0, '0, 0, 0);
      maybe_credit();
      // stray data byte (after a broken cell it would count as a cell byte)
      if (prev_whole && $urandom_range(0, 19) == 0) begin
        put(0, 8'($urandom), 0, '0, 0, 0);
        exp_errs++;
      end
      cut = ($urandom_range(0, 14) == 0) ? $urandom_range(0, CELL_BYTES - 1) : CELL_BYTES;
      put(1, CH_BOC, 0, '0, 0, 0);
      for (int b = 0; b < cut; b++) begin
        maybe_credit();
        put(0, c[CELL_W - 8*b - 1 -: 8], b == CELL_BYTES - 1, c, 0, 0);
      end
      if (cut == CELL_BYTES) n_cells++;
      else exp_errs++;   // the next begin-of-cell reports the broken one
      prev_whole = (cut == CELL_BYTES);
    end
    put(1, CH_BOC, 0, '0, 0, 0);  // closes a possibly broken last cell
    repeat (3) put(1, CH_IDLE, 0, '0, 0, 0);
    check(n_errs == exp_errs, $sformatf("errors reported %0d, expected %0d", n_errs, exp_errs));
    check(n_cells > 400 && n_credits > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
