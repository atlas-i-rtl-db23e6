// tb_cell_buffer: self-checking test of the shared cell buffer.
// Writes pseudo-random 424-bit cells into every slot, reads them back in a
// different order and checks the data and the one-cycle read latency; also
// checks a write and a read of different slots in the same cycle.
module tb_cell_buffer;
  localparam int N = 256, W = 424;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  cell_buffer #(.N(N), .WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] pattern(int a, int salt);
    logic [W-1:0] v;
    for (int i = 0; i < W / 32 + 1; i++) v[i*32 +: 32] = 32'(a * 32'h9E3779B1 + i * 77 + salt);
    return v;
  endfunction

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
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      wr_en = 1; wr_addr = 8'(a); wr_data = pattern(a, 1); model[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < N; i++) begin
      int a;
      a = (i * 37 + 11) % N;
      rd_en = 1; rd_addr = 8'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("read slot %0d", a));
    end
    // Simultaneous write to slot 3 and read of slot 4; then read 3.
    wr_en = 1; wr_addr = 3; wr_data = pattern(3, 99); model[3] = wr_data;
    rd_en = 1; rd_addr = 4;
    @(negedge clk);
    wr_en = 0;
    check(rd_data == model[4], "read during write");
    rd_addr = 3;
    @(negedge clk);
    check(rd_data == model[3], "overwritten slot");
    // rd_en low holds the last data.
    rd_en = 0; rd_addr = 5;
    @(negedge clk);
    check(rd_data == model[3], "data held when rd_en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
