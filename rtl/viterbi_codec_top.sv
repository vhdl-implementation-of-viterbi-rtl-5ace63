// viterbi_codec_top: convolutional encoder and Viterbi decoder joined through
// a channel that can flip code bits.
//
// An information bit ip enters the K=5, rate-1/3 encoder; its code symbol
// tx_sym is XORed with err_mask to model channel errors, and the result
// rx_sym is decoded in the same cycle by the Viterbi decoder. With no more
// errors than the code corrects, the decoded bits equal the input bits. The
// encoder-then-decoder loop with a deliberately corrupted symbol mirrors the
// original design's demonstration; the error-mask port is this
// implementation's way of injecting the corruption.
//
// Interface and timing: one bit per clock when en is high. The decoder's
// outputs follow viterbi_decoder: survivor holds the best path's bits the
// cycle after a bit is accepted (bit 0 newest); out_bit/out_valid deliver
// each bit SURV_LEN bits later. rst (synchronous, active high) resets the
// encoder to state 0 and restarts the decoder.
module viterbi_codec_top
  import viterbi_pkg::*;
#(
  parameter int unsigned PM_W     = 6,
  parameter int unsigned SURV_LEN = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                ip,
  input  sym_t                err_mask,
  output sym_t                tx_sym,
  output sym_t                rx_sym,
  output logic [SURV_LEN-1:0] survivor,
  output logic                out_valid,
  output logic                out_bit,
  output state_t              best_state,
  output logic [PM_W-1:0]     best_metric
);

  conv_encoder u_enc (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .ip  (ip),
    .op  (tx_sym)
  );

  assign rx_sym = tx_sym ^ err_mask;

  viterbi_decoder #(.PM_W(PM_W), .SURV_LEN(SURV_LEN)) u_dec (
    .clk         (clk),
    .rst         (rst),
    .in_valid    (en),
    .rx_sym      (rx_sym),
    .survivor    (survivor),
    .out_valid   (out_valid),
    .out_bit     (out_bit),
    .best_state  (best_state),
    .best_metric (best_metric)
  );

endmodule
