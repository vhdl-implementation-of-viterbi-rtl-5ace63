// butterfly: add-compare-select for one butterfly of the 16-state trellis.
//
// States j and j+8 (imetu_a, imetu_b: their path metrics from the previous
// stage) both lead to states 2j (input 0) and 2j+1 (input 1). The branch
// j -> 2j and the branch j+8 -> 2j+1 carry the same code symbol, whose metric
// is bm; the two crossing branches carry its complement, whose metric is
// ~bm (= 3 - bm for a 2-bit Hamming distance). So
//   ometu_0 = min(imetu_a + bm,  imetu_b + ~bm)
//   ometu_1 = min(imetu_a + ~bm, imetu_b + bm)
// and dec_0 / dec_1 are 1 when the survivor comes from state j+8. On a tie
// the path from state j is kept (this implementation's choice). The pairing
// and the shared metric follow the original design; the metric width is
// this implementation's choice, and overflow is prevented by normalisation in
// the path metric unit, so sums are kept at PM_W bits.
//
// Interface and timing: purely combinational.
module butterfly
  import viterbi_pkg::*;
#(
  parameter int unsigned PM_W = 6
) (
  input  logic [PM_W-1:0] imetu_a,
  input  logic [PM_W-1:0] imetu_b,
  input  bm_t             bm,
  output logic [PM_W-1:0] ometu_0,
  output logic [PM_W-1:0] ometu_1,
  output logic            dec_0,
  output logic            dec_1
);

  bm_t             bm_inv;
  logic [PM_W-1:0] bm_same, bm_comp;
  logic [PM_W-1:0] a0, b0, a1, b1;

  always_comb begin
    bm_inv  = ~bm;                 // 3 - bm in two bits
    bm_same = PM_W'(bm);
    bm_comp = PM_W'(bm_inv);
    a0 = imetu_a + bm_same;
    b0 = imetu_b + bm_comp;
    a1 = imetu_a + bm_comp;
    b1 = imetu_b + bm_same;
    dec_0   = b0 < a0;
    dec_1   = b1 < a1;
    ometu_0 = dec_0 ? b0 : a0;
    ometu_1 = dec_1 ? b1 : a1;
  end

endmodule
