// smu_re: survivor memory unit using register exchange.
//
// Each of the 16 states owns a SURV_LEN-bit register holding the input bits
// of its survivor path, newest bit in bit 0. On every enabled clock each new
// state s copies the register of the predecessor chosen by the ACS unit
// (state s>>1, or (s>>1)+8 when dec[s] is 1), shifts it left by one and
// appends its own input bit, which is s[0]. The register of sel_state (the
// minimum-metric state) is the decoded sequence; its oldest bit is the
// decoded output bit, SURV_LEN symbols behind the input. Register exchange
// is the survivor method of the original design; the register length and the
// read-out are this implementation's choices.
//
// Interface and timing: registers update on the rising clock edge when en is
// high; survivor and out_bit are combinational reads of the registers. rst is
// synchronous and active high and clears all registers.
module smu_re
  import viterbi_pkg::*;
#(
  parameter int unsigned SURV_LEN = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [N_STATES-1:0] dec,
  input  state_t              sel_state,
  output logic [SURV_LEN-1:0] survivor,
  output logic                out_bit
);

  logic [N_STATES-1:0][SURV_LEN-1:0] path_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      path_q <= '0;
    end else if (en) begin
      for (int s = 0; s < int'(N_STATES); s++) begin
        automatic state_t pred = state_t'((s >> 1) + (dec[s] ? int'(N_BFLY) : 0));
        path_q[s] <= {path_q[pred][SURV_LEN-2:0], s[0]};
      end
    end
  end

  assign survivor = path_q[sel_state];
  assign out_bit  = survivor[SURV_LEN-1];

endmodule
