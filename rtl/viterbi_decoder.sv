// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/3, K=5 code,
// one received symbol per clock.
//
// Datapath: the branch metric unit (bmu) turns the received symbol into eight
// Hamming metrics, one per butterfly; the add-compare-select unit (acsu, eight
// butterflies) adds them to the stored path metrics and picks a survivor for
// each of the 16 states; the path metric unit (pmu) stores the normalised
// metrics and finds the minimum-metric state; the survivor memory (smu_re)
// keeps, by register exchange, the decoded bits of every state's survivor and
// reads out the one of the minimum-metric state. This partition follows the
// original design, except that the additions sit in the butterflies rather
// than in the path metric unit.
//
// Interface and timing: rx_sym is taken on a rising edge with in_valid high.
// The cycle after the n-th accepted symbol, survivor holds the decoded bits
// of the best path up to symbol n (bit 0 = symbol n) and best_state /
// best_metric describe that path. Once SURV_LEN symbols have been accepted,
// out_valid is high for one cycle after each accepted symbol and out_bit is
// the decoded bit of symbol n - SURV_LEN + 1. rst is synchronous, active high,
// and restarts decoding from encoder state 0.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned PM_W     = 6,
  parameter int unsigned SURV_LEN = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  sym_t                rx_sym,
  output logic [SURV_LEN-1:0] survivor,
  output logic                out_valid,
  output logic                out_bit,
  output state_t              best_state,
  output logic [PM_W-1:0]     best_metric
);

  bm_t  [N_BFLY-1:0]             bm;
  logic [N_STATES-1:0][PM_W-1:0] pm, pm_new;
  logic [N_STATES-1:0]           dec;

  localparam int unsigned FILL_W = $clog2(SURV_LEN + 1);
  logic [FILL_W-1:0] fill_q;
  logic              step_q;

  bmu u_bmu (
    .rx_sym (rx_sym),
    .bm     (bm)
  );

  acsu #(.PM_W(PM_W)) u_acsu (
    .pm_in  (pm),
    .bm     (bm),
    .pm_out (pm_new),
    .dec    (dec)
  );

  pmu #(.PM_W(PM_W)) u_pmu (
    .clk         (clk),
    .rst         (rst),
    .en          (in_valid),
    .pm_new      (pm_new),
    .pm          (pm),
    .best_state  (best_state),
    .best_metric (best_metric)
  );

  smu_re #(.SURV_LEN(SURV_LEN)) u_smu (
    .clk       (clk),
    .rst       (rst),
    .en        (in_valid),
    .dec       (dec),
    .sel_state (best_state),
    .survivor  (survivor),
    .out_bit   (out_bit)
  );

  // Count accepted symbols up to SURV_LEN: the oldest survivor bit is only
  // meaningful once the registers have been filled.
  always_ff @(posedge clk) begin
    if (rst) begin
      fill_q <= '0;
      step_q <= 1'b0;
    end else begin
      step_q <= in_valid;
      if (in_valid && fill_q != FILL_W'(SURV_LEN))
        fill_q <= fill_q + 1'b1;
    end
  end

  assign out_valid = step_q && (fill_q == FILL_W'(SURV_LEN));

endmodule
