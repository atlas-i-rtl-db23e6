// tb_bundle_map: self-checking test of the link-bundling map.
// Checks a mixed configuration (octet, quad, two pairs, four singles) and the
// all-single and all-octet configurations against leaders worked out by hand.
module tb_bundle_map;
  logic [15:0][1:0] mode;
  logic [15:0][3:0] leader;
  logic [15:0]      is_leader;
  int checks = 0, failures = 0;
  logic clk = 0;

  bundle_map #(.LINKS(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_leader [16];
    // links 0-7 octet, 8-11 quad, 12-13 pair, 14-15 pair
    for (int j = 0; j < 8; j++)   begin mode[j] = 2'd3; exp_leader[j] = 0; end
    for (int j = 8; j < 12; j++)  begin mode[j] = 2'd2; exp_leader[j] = 8; end
    mode[12] = 2'd1; mode[13] = 2'd1; exp_leader[12] = 12; exp_leader[13] = 12;
    mode[14] = 2'd1; mode[15] = 2'd1; exp_leader[14] = 14; exp_leader[15] = 14;
    #1;
    for (int j = 0; j < 16; j++) begin
      check(leader[j] == 4'(exp_leader[j]), $sformatf("mixed: leader of %0d is %0d", j, leader[j]));
      check(is_leader[j] == (exp_leader[j] == j), $sformatf("mixed: is_leader %0d", j));
    end
    check(is_leader == 16'b0101_0001_0000_0001, "mixed: leader vector");
    mode = '0; #1;
    for (int j = 0; j < 16; j++) check(leader[j] == 4'(j), "single");
    check(is_leader == 16'hFFFF, "single: all leaders");
    mode = {16{2'd3}}; #1;
    for (int j = 0; j < 16; j++) check(leader[j] == ((j < 8) ? 4'd0 : 4'd8), "octets");
    check(is_leader == 16'h0101, "octets: two leaders");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
