// bundle_map: link bundling configuration.
//
// Links can run singly, or as pairs, quads or octets that act as one faster
// logical link; different links may use different modes. Each link has a
// two-bit mode (0 single, 1 pair, 2 quad, 3 octet). A bundle is an aligned
// group of 2^mode links; its lowest link is the leader and names the logical
// port: output queues and credit counts are kept under the leader, and any
// free link of the bundle may carry the leader's cells. The aligned-group rule
// and the per-link mode encoding are choices of this design; the software must
// give all links of one bundle the same mode.
//
// Purely combinational.
module bundle_map #(
  parameter int unsigned LINKS = atlas_pkg::N_LINKS
) (
  input  logic [LINKS-1:0][1:0]               mode,
  output logic [LINKS-1:0][$clog2(LINKS)-1:0] leader,     // leader of each link's bundle
  output logic [LINKS-1:0]                    is_leader
);
  localparam int unsigned LW = $clog2(LINKS);

  always_comb begin
    for (int j = 0; j < LINKS; j++) begin
      logic [LW-1:0] size_mask;
      size_mask    = LW'((1 << mode[j]) - 1);
      leader[j]    = LW'(j) & ~size_mask;
      is_leader[j] = (leader[j] == LW'(j));
    end
  end
endmodule
