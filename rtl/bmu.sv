// bmu: branch metric unit of the Viterbi decoder.
//
// For every received 3-bit symbol it produces one hard-decision branch metric
// per butterfly: bm[j] is the Hamming distance between the received symbol
// and the code symbol on the branch from state j with input 0. Because every
// generator taps both the input and the oldest register stage, the other
// three branches of butterfly j carry either the same symbol or its bitwise
// complement, so their metrics are bm[j] or 3 - bm[j] (the 2-bit complement
// ~bm[j]); the butterflies form that themselves. This gives 8 metric
// computations per stage instead of 32. Hamming distance and the butterfly
// sharing follow the original design; the expected symbols are derived from
// the generator constants in viterbi_pkg at elaboration time.
//
// Interface and timing: purely combinational, rx_sym in, bm out in the same
// cycle.
module bmu
  import viterbi_pkg::*;
(
  input  sym_t                 rx_sym,
  output bm_t [N_BFLY-1:0]     bm
);

  for (genvar j = 0; j < N_BFLY; j++) begin : g_bm
    localparam sym_t EXPECTED = branch_symbol(state_t'(j), 1'b0);
    assign bm[j] = hamming(rx_sym, EXPECTED);
  end

endmodule
