// tb_header_rewrite: self-checking test of the header rewrite.
// HEC values are checked against known ATM headers (the idle cell header
// 00 00 00 01 has HEC 0x52; an all-zero header has HEC 0x55) and against a
// table-driven CRC-8 written independently here. Also checks VPI/VCI
// replacement, that GFC/CLP pass through, and the EFCI rule: marked at or above
// the threshold for user data cells only.
module tb_header_rewrite;
  import atlas_pkg::*;
  atm_hdr_t hdr_in, hdr_out;
  logic [7:0] new_vpi;
  logic [15:0] new_vci;
  logic [8:0] occupancy, efci_thresh;
  logic efci_marked;
  logic clk = 0;
  int checks = 0, failures = 0;

  header_rewrite dut (.*);
  always #5 clk = ~clk;

  // Reference CRC-8 by a byte-wise table built from the polynomial 0x07.
  logic [7:0] tbl [256];
  function automatic logic [7:0] ref_hec(logic [31:0] h);
    logic [7:0] c;
    c = 0;
    for (int b = 3; b >= 0; b--) c = tbl[c ^ h[b*8 +: 8]];
    return c ^ 8'h55;
  endfunction

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
    for (int i = 0; i < 256; i++) begin
      logic [7:0] c;
      c = 8'(i);
      for (int k = 0; k < 8; k++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
      tbl[i] = c;
    end
    efci_thresh = 200; occupancy = 10;
    // Idle-cell header: VPI 0, VCI 0, PTI 0, CLP 1 -> HEC 0x52.
    hdr_in = '{gfc: 0, vpi: 0, vci: 0, pti: 0, clp: 1, hec: 0};
    new_vpi = 0; new_vci = 0; #1;
    check(hdr_out.hec == 8'h52, $sformatf("idle HEC %h", hdr_out.hec));
    hdr_in.clp = 0; #1;
    check(hdr_out.hec == 8'h55, "zero header HEC");
    // Translation.
    hdr_in = '{gfc: 4'hA, vpi: 8'h12, vci: 16'h3456, pti: 3'b000, clp: 1, hec: 8'hFF};
    new_vpi = 8'h9C; new_vci = 16'hBEEF; #1;
    check(hdr_out.vpi == 8'h9C && hdr_out.vci == 16'hBEEF, "new VPI/VCI");
    check(hdr_out.gfc == 4'hA && hdr_out.clp == 1 && hdr_out.pti == 3'b000, "GFC/PTI/CLP kept");
    check(!efci_marked, "not congested");
    check(hdr_out.hec == ref_hec({4'hA, 8'h9C, 16'hBEEF, 3'b000, 1'b1}), "HEC recomputed");
    // Congestion at the threshold marks user data.
    occupancy = 200; #1;
    check(efci_marked && hdr_out.pti == 3'b010, "EFCI at threshold");
    check(hdr_out.hec == ref_hec({4'hA, 8'h9C, 16'hBEEF, 3'b010, 1'b1}), "HEC after EFCI");
    occupancy = 199; #1;
    check(!efci_marked && hdr_out.pti == 3'b000, "below threshold");
    // OAM cell (PTI 100) is never marked.
    occupancy = 255; hdr_in.pti = 3'b100; #1;
    check(!efci_marked && hdr_out.pti == 3'b100, "OAM not marked");
    // Random headers against the reference.
    for (int n = 0; n < 200; n++) begin
      hdr_in = atm_hdr_t'({$urandom, 8'($urandom)});
      new_vpi = 8'($urandom); new_vci = 16'($urandom);
      occupancy = 9'($urandom_range(0, 256)); #1;
      begin
        logic [2:0] p;
        p = hdr_in.pti;
        if (occupancy >= efci_thresh && !p[2]) p[1] = 1'b1;
        check(hdr_out.pti == p, "random PTI");
        check(hdr_out.hec == ref_hec({hdr_in.gfc, new_vpi, new_vci, p, hdr_in.clp}), "random HEC");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
