// credit_table: upstream-side state of the multi-lane credit protocol.
//
// For every output (logical port) the switch keeps a pool credit, the number of
// free cell slots in the buffer pool that the downstream switch set aside for
// this link (L slots, the number of lanes), and one credit bit per flow group,
// which starts at 1. A back-pressured cell of flow group i may leave on output o
// only if fgCr[o][i] = 1 and poolCr[o] > 0; when it leaves both are decremented
// (consume). When a credit carrying flow group i comes back from downstream
// both are incremented again. These rules are the protocol of the chip
// description. Credits arrive on input links (link j returns credits for
// output j, the other direction of the same cable); with link bundling every
// link of a bundle credits the bundle's leader, so several credits for one port
// can arrive in a cycle and are all counted.
//
// Interface: load (management) sets every pool credit from pool_init and every
// flow-group credit to 1. Reset sets pool credits to 0, so back-pressured
// traffic waits until software has loaded the pool sizes. fg_cr and pool_cr
// are registered state; consume and credit arrivals act at the clock edge.
module credit_table #(
  parameter int unsigned OUTS  = atlas_pkg::N_LINKS,
  parameter int unsigned LINKS = atlas_pkg::N_LINKS,
  parameter int unsigned FGW   = atlas_pkg::FG_W,
  parameter int unsigned PW    = $clog2(atlas_pkg::N_CELLS) + 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  load,
  input  logic [OUTS-1:0][PW-1:0]               pool_init,
  input  logic                                  consume,
  input  logic [$clog2(OUTS)-1:0]               consume_out,
  input  logic [FGW-1:0]                        consume_fg,
  input  logic [LINKS-1:0]                      cr_valid,
  input  logic [LINKS-1:0][$clog2(OUTS)-1:0]    cr_port,
  input  logic [LINKS-1:0][FGW-1:0]             cr_fg,
  output logic [OUTS-1:0][(1<<FGW)-1:0]         fg_cr,
  output logic [OUTS-1:0][PW-1:0]               pool_cr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fg_cr   <= '1;
      pool_cr <= '0;
    end else if (load) begin
      fg_cr   <= '1;
      pool_cr <= pool_init;
    end else begin
      for (int o = 0; o < OUTS; o++) begin
        logic [PW-1:0] pool;
        pool = pool_cr[o];
        if (consume && consume_out == ($clog2(OUTS))'(o)) begin
          fg_cr[o][consume_fg] <= 1'b0;
          pool = pool - PW'(1);
        end
        for (int j = 0; j < LINKS; j++)
          if (cr_valid[j] && cr_port[j] == ($clog2(OUTS))'(o)) begin
            fg_cr[o][cr_fg[j]] <= 1'b1;
            pool = pool + PW'(1);
          end
        pool_cr[o] <= pool;
      end
    end
  end

  // A cell may only take credits that are there.
  assert property (@(posedge clk) disable iff (!rst_n || load)
                   consume |-> fg_cr[consume_out][consume_fg] && pool_cr[consume_out] != '0)
    else $error("credit_table: cell sent without credit on output %0d", consume_out);
endmodule
