// tb_link_tx: self-checking test of the link transmitter.
// Pushes random cells and credits (never into a full queue) and decodes the
// character stream in the testbench: every cell must come out whole and in
// order as a begin-of-cell character and 53 bytes, every credit as a credit
// character and its flow-group byte, idle characters only when nothing is
// queued, and a credit pushed while a cell is being sent must appear inside
// that cell rather than after it. The number of credits seen inside cells is
// counted and must be non-zero.
module tb_link_tx;
  import atlas_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cell_valid = 0, cr_valid = 0;
  atm_cell_t cell_data = '0;
  logic [FG_W-1:0] cr_fg = '0;
  link_char_t ch;
  logic cell_full, cr_full;

  atm_cell_t exp_cells [$];
  int        exp_cr [$];
  int checks = 0, failures = 0;
  int in_cell = 0, byte_no = 0, want_fg = 0, mid_credits = 0;
  int cells_seen = 0, credits_seen = 0, idles = 0;
  logic [CELL_W-1:0] got;

  link_tx dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decoder: runs on every character after reset.
  always @(posedge clk) if (rst_n) begin
    if (ch.ctrl) begin
      check(!want_fg, "control character where a flow-group byte was due");
      if (ch.data == CH_BOC) begin
        check(!in_cell, "begin-of-cell inside a cell");
        in_cell = 1; byte_no = 0;
      end else if (ch.data == CH_CREDIT) begin
        want_fg = 1;
        if (in_cell) mid_credits++;
      end else begin
        check(ch.data == CH_IDLE, "unknown control character");
        idles++;
        check(!in_cell, "idle inside a cell");
      end
    end else if (want_fg) begin
      want_fg = 0;
      credits_seen++;
      check(exp_cr.size() > 0, "credit with none queued");
      if (exp_cr.size() > 0) begin
        check(int'(ch.data) == exp_cr[0],
              $sformatf("credit fg %0d, expected %0d", ch.data, exp_cr[0]));
        void'(exp_cr.pop_front());
      end
    end else begin
      check(in_cell == 1, "data byte outside a cell");
      got = {got[CELL_W-9:0], ch.data};
      byte_no++;
      if (byte_no == CELL_BYTES) begin
        in_cell = 0; cells_seen++;
        check(exp_cells.size() > 0, "cell with none queued");
        if (exp_cells.size() > 0) begin
          check(got == exp_cells[0], $sformatf("cell %0d contents", cells_seen));
          void'(exp_cells.pop_front());
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Random traffic; the cell rate is close to the link rate.
    for (int cyc = 0; cyc < 20000; cyc++) begin
      cell_valid = 0; cr_valid = 0;
      if (!cell_full && $urandom_range(0, 59) == 0) begin
        atm_cell_t c;
        for (int w = 0; w < CELL_W / 32 + 1; w++) c = {c, 32'($urandom)};
        cell_valid = 1; cell_data = c; exp_cells.push_back(c);
      end
      if (!cr_full && $urandom_range(0, 39) == 0) begin
        cr_valid = 1; cr_fg = FG_W'($urandom); exp_cr.push_back(int'(cr_fg));
      end
      @(negedge clk);
    end
    cell_valid = 0; cr_valid = 0;
    repeat (400) @(negedge clk);
    check(exp_cells.size() == 0 && exp_cr.size() == 0, "everything sent");
    check(cells_seen > 200 && credits_seen > 300, "enough traffic");
    check(mid_credits > 0, "credits inserted inside cells");
    check(idles > 0, "idle characters when nothing is queued");
    $display("cells=%0d credits=%0d credits_inside_cells=%0d", cells_seen, credits_seen,
             mid_credits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
