// tb_load_monitor: self-checking test of the simulated-buffer loss counters.
// Drives random arrivals to four simulated buffers with different sizes and
// service periods and compares occupancy, arrival and loss counts every cycle
// with a reference model; then checks clear. The loss counts must be nonzero
// for the small, slowly served buffer.
module tb_load_monitor;
  localparam int NV = 4, OW = 9;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [NV-1:0][OW-1:0] vb_size;
  logic [NV-1:0][15:0] vb_period;
  logic arrive_valid = 0;
  logic [1:0] arrive_grp = 0;
  logic [NV-1:0][OW-1:0] occupancy;
  logic [NV-1:0][31:0] arrivals, losses;

  int mocc [NV], marr [NV], mloss [NV], mtim [NV];
  int checks = 0, failures = 0;

  load_monitor #(.NV(NV), .OW(OW), .CTW(32)) dut (.*);
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
    vb_size[0] = 2;  vb_period[0] = 8;
    vb_size[1] = 8;  vb_period[1] = 4;
    vb_size[2] = 32; vb_period[2] = 2;
    vb_size[3] = 4;  vb_period[3] = 1;
    for (int v = 0; v < NV; v++) begin mocc[v] = 0; marr[v] = 0; mloss[v] = 0; mtim[v] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      for (int v = 0; v < NV; v++) begin
        check(occupancy[v] == OW'(mocc[v]), $sformatf("occupancy %0d", v));
        check(arrivals[v] == 32'(marr[v]) && losses[v] == 32'(mloss[v]), $sformatf("cyc %0d counters %0d: %0d/%0d vs %0d/%0d", cyc, v, arrivals[v], losses[v], marr[v], mloss[v]));
      end
      arrive_valid = $urandom_range(0, 2) != 0;
      arrive_grp = 2'($urandom);
      // model of the next edge
      for (int v = 0; v < NV; v++) begin
        bit tick;
        tick = (mtim[v] + 1 >= vb_period[v]);
        mtim[v] = tick ? 0 : mtim[v] + 1;
        if (tick && mocc[v] > 0) mocc[v]--;
        if (arrive_valid && arrive_grp == v) begin
          marr[v]++;
          if (mocc[v] < vb_size[v]) mocc[v]++; else mloss[v]++;
        end
      end
      @(negedge clk);
    end
    arrive_valid = 0;
    check(mloss[0] > 100, "small buffer lost cells");
    clear = 1; @(negedge clk); clear = 0;
    check(arrivals == '0 && losses == '0 && occupancy == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
