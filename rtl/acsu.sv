// acsu: add-compare-select unit, eight butterflies side by side.
//
// Butterfly j takes the previous path metrics of states j and j+8 and the
// branch metric bm[j], and produces the new metrics of states 2j and 2j+1
// together with one decision bit per new state (1: the survivor came from
// the predecessor in the upper half, state (s>>1)+8). All 16 states are
// updated in parallel. Building the ACS out of butterflies follows the
// original design; the fully parallel arrangement is this implementation's
// choice.
//
// Interface and timing: purely combinational, one trellis stage per use.
// pm_out is not normalised; the path metric unit does that when storing.
module acsu
  import viterbi_pkg::*;
#(
  parameter int unsigned PM_W = 6
) (
  input  logic [N_STATES-1:0][PM_W-1:0] pm_in,
  input  bm_t  [N_BFLY-1:0]             bm,
  output logic [N_STATES-1:0][PM_W-1:0] pm_out,
  output logic [N_STATES-1:0]           dec
);

  for (genvar j = 0; j < N_BFLY; j++) begin : g_bfly
    butterfly #(.PM_W(PM_W)) u_bfly (
      .imetu_a (pm_in[j]),
      .imetu_b (pm_in[j + N_BFLY]),
      .bm      (bm[j]),
      .ometu_0 (pm_out[2*j]),
      .ometu_1 (pm_out[2*j + 1]),
      .dec_0   (dec[2*j]),
      .dec_1   (dec[2*j + 1])
    );
  end

endmodule
