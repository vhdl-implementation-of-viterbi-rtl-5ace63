// viterbi_pkg: constants and helper functions shared by the rate-1/3,
// constraint-length-5 convolutional encoder and its Viterbi decoder.
//
// The code has one input bit and three output bits per step (k=1, n=3, K=5),
// so the trellis has 2^(K-1) = 16 states and 8 butterflies. The three
// generator polynomials (octal 25, 33, 37) are written MSB-first over the tap
// vector {input, M3, M2, M1, M0}, where M3 holds the previous input and M0 the
// oldest one:
//   G0 = in ^ M2 ^ M0
//   G1 = in ^ M3 ^ M1 ^ M0
//   G2 = in ^ M3 ^ M2 ^ M1 ^ M0
// A code symbol is the 3-bit value {G0, G1, G2}, G0 in bit 2.
//
// Trellis state numbering: state = {M0, M1, M2, M3} (oldest input in the MSB),
// so the next state after input u is ((state << 1) | u) mod 16, and states j
// and j+8 both lead to states 2j and 2j+1. These are the numbering, the
// generators and the butterfly pairing of the original design; the function
// and type names are this implementation's own.
package viterbi_pkg;

  localparam int unsigned K        = 5;             // constraint length
  localparam int unsigned N_OUT    = 3;             // code bits per input bit
  localparam int unsigned MEM      = K - 1;         // shift register stages
  localparam int unsigned N_STATES = 1 << MEM;      // trellis states
  localparam int unsigned N_BFLY   = N_STATES / 2;  // butterflies per stage
  localparam int unsigned BM_W     = 2;             // Hamming distance 0..3

  typedef logic [MEM-1:0]   state_t;
  typedef logic [N_OUT-1:0] sym_t;
  typedef logic [BM_W-1:0]  bm_t;

  // Generator taps over {in, M3, M2, M1, M0}; index 0 is G0.
  localparam logic [K-1:0] GEN [N_OUT] = '{5'b10101, 5'b11011, 5'b11111};

  // Tap vector {in, M3, M2, M1, M0} for input u leaving trellis state s.
  function automatic logic [K-1:0] tap_vector(state_t s, logic u);
    return {u, s[0], s[1], s[2], s[3]};
  endfunction

  // Code symbol {G0, G1, G2} emitted on the branch from state s with input u.
  function automatic sym_t branch_symbol(state_t s, logic u);
    sym_t y;
    for (int g = 0; g < int'(N_OUT); g++)
      y[N_OUT-1-g] = ^(tap_vector(s, u) & GEN[g]);
    return y;
  endfunction

  // Hamming distance between two code symbols.
  function automatic bm_t hamming(sym_t a, sym_t b);
    sym_t d;
    d = a ^ b;
    return bm_t'(d[0]) + bm_t'(d[1]) + bm_t'(d[2]);
  endfunction

endpackage
