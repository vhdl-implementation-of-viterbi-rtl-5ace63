// conv_encoder: rate-1/3, constraint-length-5 convolutional encoder.
//
// A four-stage shift register M3 -> M2 -> M1 -> M0 holds the last four input
// bits (M3 the newest). Three XOR trees over the current input and the
// register form the code symbol op = {G0, G1, G2}:
//   G0 = ip ^ M2 ^ M0,  G1 = ip ^ M3 ^ M1 ^ M0,  G2 = ip ^ M3 ^ M2 ^ M1 ^ M0.
// The register structure and the taps are those of the original design; the
// enable input and the exact reset style are this implementation's choice.
//
// Interface and timing: op is combinational from ip and the register, so the
// symbol for a bit is valid in the same cycle as the bit. On a rising clock
// edge with en high the register shifts ip in. rst is synchronous and active
// high and clears the register to the all-zero state, the start state the
// decoder assumes. One bit in and one symbol out per clock.
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic ip,
  output sym_t op
);

  logic m3, m2, m1, m0;

  always_ff @(posedge clk) begin
    if (rst) begin
      {m3, m2, m1, m0} <= '0;
    end else if (en) begin
      {m3, m2, m1, m0} <= {ip, m3, m2, m1};
    end
  end

  // Taps as in viterbi_pkg::GEN, written out over the named stages.
  always_comb begin
    op[2] = ip ^ m2 ^ m0;
    op[1] = ip ^ m3 ^ m1 ^ m0;
    op[0] = ip ^ m3 ^ m2 ^ m1 ^ m0;
  end

endmodule
