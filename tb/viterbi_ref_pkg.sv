// viterbi_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//
// The encoder is modelled from its defining equations over the current bit u
// and the four previous bits past[0] (newest) .. past[3] (oldest):
//   G0 = u ^ past[1] ^ past[3]
//   G1 = u ^ past[0] ^ past[2] ^ past[3]
//   G2 = u ^ past[0] ^ past[1] ^ past[2] ^ past[3]
// With the trellis numbering used by the decoder (oldest bit in the MSB),
// a trellis state s has past == s bit for bit. A brute-force maximum-
// likelihood search over every input sequence of a short frame serves as the
// reference for the decoder.
package viterbi_ref_pkg;

  function automatic logic [2:0] ref_symbol(logic u, logic [3:0] past);
    logic g0, g1, g2;
    g0 = u ^ past[1] ^ past[3];
    g1 = u ^ past[0] ^ past[2] ^ past[3];
    g2 = u ^ past[0] ^ past[1] ^ past[2] ^ past[3];
    return {g0, g1, g2};
  endfunction

  function automatic int ref_dist(logic [2:0] a, logic [2:0] b);
    int d;
    d = 0;
    for (int i = 0; i < 3; i++) d += int'(a[i] != b[i]);
    return d;
  endfunction

  // Hamming distance between the encoding (from the zero state) of the
  // first n bits of bits (bits[n-1] sent first) and the received symbols.
  function automatic int ref_seq_dist(logic [31:0] bits, int n, logic [2:0] rx [32]);
    logic [3:0] past;
    int d;
    past = '0;
    d = 0;
    for (int t = 0; t < n; t++) begin
      logic u;
      u = bits[n-1-t];
      d += ref_dist(ref_symbol(u, past), rx[t]);
      past = {past[2:0], u};
    end
    return d;
  endfunction

  // Smallest distance of any n-bit input sequence (n <= 16) to rx.
  function automatic int ref_ml_dist(int n, logic [2:0] rx [32]);
    int best;
    best = 1 << 30;
    for (int c = 0; c < (1 << n); c++) begin
      int d;
      d = ref_seq_dist(32'(c), n, rx);
      if (d < best) best = d;
    end
    return best;
  endfunction

endpackage
