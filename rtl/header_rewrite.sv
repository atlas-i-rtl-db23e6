// header_rewrite: builds the outgoing ATM header of a switched cell.
//
// Replaces VPI and VCI with the values from the translation table (all copies
// of a multicast cell share them), marks EFCI (Explicit Forward Congestion
// Indication, the ATM Forum standard the chip supports) when the switch is
// congested, and regenerates the HEC byte over the new header. EFCI is set by
// raising the middle PTI bit of user-data cells (PTI[2] = 0); OAM and resource
// management cells are passed unmarked. Congestion here means that the shared
// buffer holds at least efci_thresh cells; the threshold rule is a choice of
// this design.
//
// Purely combinational.
module header_rewrite
  import atlas_pkg::*;
#(
  parameter int unsigned OCC_W = $clog2(N_CELLS) + 1
) (
  input  atm_hdr_t     hdr_in,
  input  logic [7:0]   new_vpi,
  input  logic [15:0]  new_vci,
  input  logic [OCC_W-1:0] occupancy,
  input  logic [OCC_W-1:0] efci_thresh,
  output atm_hdr_t     hdr_out,
  output logic         efci_marked
);
  always_comb begin
    hdr_out     = hdr_in;
    hdr_out.vpi = new_vpi;
    hdr_out.vci = new_vci;
    efci_marked = (occupancy >= efci_thresh) && !hdr_in.pti[2];
    if (efci_marked) hdr_out.pti[1] = 1'b1;
    hdr_out.hec = atm_hec({hdr_out.gfc, hdr_out.vpi, hdr_out.vci, hdr_out.pti, hdr_out.clp});
  end
endmodule
