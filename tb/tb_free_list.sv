// tb_free_list: self-checking test of the free list.
// Allocates every slot and checks they come out lowest-first, checks the
// empty flag and the free count, frees slots out of order and checks that the
// lowest free one is handed out next, and exercises alloc and free together.
module tb_free_list;
  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  logic alloc = 0, free_valid = 0;
  logic [7:0] alloc_addr, free_addr = 0;
  logic empty;
  logic [8:0] free_count;
  int checks = 0, failures = 0;

  free_list #(.N(N)) dut (.*);

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
    @(negedge clk);
    check(free_count == 9'(N) && !empty, "reset: all free");
    for (int i = 0; i < N; i++) begin
      check(alloc_addr == 8'(i), $sformatf("alloc order %0d got %0d", i, alloc_addr));
      alloc = 1;
      @(negedge clk);
    end
    alloc = 0;
    check(empty && free_count == 0, "empty after allocating all");
    // Free 200, 17, 99 and expect 17, 99, 200 back.
    free_valid = 1; free_addr = 200; @(negedge clk);
    free_addr = 17; @(negedge clk);
    free_addr = 99; @(negedge clk);
    free_valid = 0;
    check(free_count == 3 && !empty, "three freed");
    check(alloc_addr == 17, "lowest free is 17");
    // Allocate 17 while freeing 5.
    alloc = 1; free_valid = 1; free_addr = 5; @(negedge clk);
    free_valid = 0; alloc = 0;
    check(free_count == 3, "count after alloc+free");
    check(alloc_addr == 5, "lowest free is 5");
    alloc = 1; @(negedge clk);
    check(alloc_addr == 99, "then 99");
    @(negedge clk);
    check(alloc_addr == 200, "then 200");
    @(negedge clk);
    alloc = 0;
    check(empty && free_count == 0, "empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
