// load_monitor: hardware support for accelerated cell-loss measurement.
//
// Cell loss in the real 256-cell buffer is too rare to measure directly, so the
// chip emulates several smaller buffers, each fed by a different subset of the
// real VCs (selected in the translation table), and counts how many of their
// cells would have been lost; software extrapolates the real loss probability
// from these higher figures. That much is from the chip description. Here each
// simulated buffer is a counter of its occupancy with a programmable capacity
// (size) and a programmable deterministic server that removes one cell every
// period cycles; an arriving cell that finds the simulated buffer full counts
// as a loss instead of entering. The server model is a choice of this design.
//
// Interface: arrive_valid/arrive_grp report one admitted cell of a monitored VC
// per cycle. clear zeroes occupancies, timers and counters. arrivals/losses are
// free-running counters read by management software.
module load_monitor #(
  parameter int unsigned NV  = atlas_pkg::N_VBUF,
  parameter int unsigned OW  = $clog2(atlas_pkg::N_CELLS) + 1,
  parameter int unsigned CTW = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic [NV-1:0][OW-1:0]          vb_size,
  input  logic [NV-1:0][15:0]            vb_period,
  input  logic                           arrive_valid,
  input  logic [$clog2(NV)-1:0]          arrive_grp,
  output logic [NV-1:0][OW-1:0]          occupancy,
  output logic [NV-1:0][CTW-1:0]         arrivals,
  output logic [NV-1:0][CTW-1:0]         losses
);
  logic [NV-1:0][15:0] timer_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer_q   <= '0;
      occupancy <= '0;
      arrivals  <= '0;
      losses    <= '0;
    end else if (clear) begin
      timer_q   <= '0;
      occupancy <= '0;
      arrivals  <= '0;
      losses    <= '0;
    end else begin
      for (int v = 0; v < NV; v++) begin
        logic          tick;
        logic [OW-1:0] occ;
        // Deterministic server: one departure every vb_period cycles.
        tick = (timer_q[v] + 16'd1 >= vb_period[v]);
        timer_q[v] <= tick ? 16'd0 : timer_q[v] + 16'd1;
        occ = occupancy[v];
        if (tick && occ != '0) occ = occ - OW'(1);
        if (arrive_valid && arrive_grp == ($clog2(NV))'(v)) begin
          arrivals[v] <= arrivals[v] + CTW'(1);
          if (occ < vb_size[v]) occ = occ + OW'(1);
          else                  losses[v] <= losses[v] + CTW'(1);
        end
        occupancy[v] <= occ;
      end
    end
  end
endmodule
