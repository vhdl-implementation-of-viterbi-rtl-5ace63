// pmu: path metric unit, the storage between trellis stages.
//
// It holds the 16 path metrics of the current stage. After reset, state 0
// (the encoder's reset state) has metric 0 and every other state PM_INIT, so
// paths that do not start in state 0 are penalised. On every enabled clock it
// stores the new metrics from the ACS unit minus the minimum of the metrics it
// held before; since every new metric is at least that minimum, stored values
// stay non-negative and, for hard-decision metrics of a 16-state code, below
// PM_INIT + 12 + 3, which fits PM_W = 6 bits. The same minimum search reports
// the best (minimum-metric) state, which selects the decoded survivor; ties
// go to the lower state number. The role of the unit follows the original
// design; the start values, the normalisation and the widths are this
// implementation's choices. An assertion checks that the stored metrics
// leave room for one more addition of the largest branch metric.
//
// Interface and timing: pm, best_state and best_metric come from registers
// (through the combinational minimum search). rst is synchronous and active
// high; en stores one stage.
module pmu
  import viterbi_pkg::*;
#(
  parameter int unsigned PM_W    = 6,
  parameter int unsigned PM_INIT = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic [N_STATES-1:0][PM_W-1:0] pm_new,
  output logic [N_STATES-1:0][PM_W-1:0] pm,
  output state_t                        best_state,
  output logic [PM_W-1:0]               best_metric
);

  localparam logic [PM_W-1:0] HEADROOM_MAX = PM_W'((1 << PM_W) - 1 - 3);

  logic [PM_W-1:0] worst_metric;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < int'(N_STATES); s++)
        pm[s] <= (s == 0) ? '0 : PM_W'(PM_INIT);
    end else if (en) begin
      for (int s = 0; s < int'(N_STATES); s++)
        pm[s] <= pm_new[s] - best_metric;
    end
  end

  always_comb begin
    best_state   = '0;
    best_metric  = pm[0];
    worst_metric = pm[0];
    for (int s = 1; s < int'(N_STATES); s++) begin
      if (pm[s] < best_metric) begin
        best_metric = pm[s];
        best_state  = state_t'(s);
      end
      if (pm[s] > worst_metric)
        worst_metric = pm[s];
    end
  end

  a_headroom: assert property (@(posedge clk) disable iff (rst)
    worst_metric <= HEADROOM_MAX)
    else $error("pmu: path metric %0d leaves no headroom in %0d bits",
                worst_metric, PM_W);

endmodule
