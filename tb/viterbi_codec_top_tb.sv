// viterbi_codec_top_tb: end-to-end testbench for viterbi_codec_top at its
// default parameters (PM_W = 6, SURV_LEN = 8).
//
// 1. The worked example: after reset the bits 0,1,1,0,1,0,1,0 are encoded;
//    the first symbol 000 is corrupted to 001 by the error mask. The encoder
//    symbols must be 000 111 100 110 001 111 101 000 and, after the eighth
//    bit, the best survivor must read 01101010 with path metric 1.
// 2. A 4000-bit stream with idle cycles, isolated single-bit errors, one
//    reset in the middle, and a check that every decoded bit equals the bit
//    sent SURV_LEN bits earlier.
// It counts how often each mechanism of the design was exercised: corrected
// channel errors, path-metric normalisation (a non-zero minimum removed),
// survivor selections from the upper predecessor (state (s>>1)+8), idle
// cycles, streamed output bits and restarts by reset. A mechanism never seen
// counts as a failure.
module viterbi_codec_top_tb;
  import viterbi_ref_pkg::*;

  localparam int unsigned SURV_LEN = 8;

  logic                clk = 1'b0;
  logic                rst, en, ip;
  logic [2:0]          err_mask, tx_sym, rx_sym;
  logic [SURV_LEN-1:0] survivor;
  logic                out_valid, out_bit;
  logic [3:0]          best_state;
  logic [5:0]          best_metric;
  int                  checks = 0, failures = 0;
  int                  n_err = 0, n_norm = 0, n_upper = 0, n_idle = 0, n_out = 0, n_restart = 0;

  viterbi_codec_top dut (
    .clk(clk), .rst(rst), .en(en), .ip(ip), .err_mask(err_mask),
    .tx_sym(tx_sym), .rx_sym(rx_sym), .survivor(survivor),
    .out_valid(out_valid), .out_bit(out_bit),
    .best_state(best_state), .best_metric(best_metric));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Survivor selections from the upper half of the trellis, every step.
  always @(posedge clk)
    if (!rst && en) n_upper += $countones(dut.u_dec.dec);

  task automatic step(logic bit_in, logic [2:0] mask);
    if (best_metric != 0) n_norm++;
    en = 1'b1; ip = bit_in; err_mask = mask;
    #1;
    if (mask != 0) n_err++;
    @(posedge clk); #1;
    en = 1'b0; err_mask = '0;
  endtask

  localparam logic [7:0] EX_BITS = 8'b01101010;
  localparam logic [2:0] EX_SYMS [8] = '{3'b000, 3'b111, 3'b100, 3'b110,
                                         3'b001, 3'b111, 3'b101, 3'b000};

  initial begin
    logic sent [$];
    int   accepted, since_err;

    // 1. Worked example.
    rst = 1'b1; en = 1'b0; ip = 1'b0; err_mask = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int t = 0; t < 8; t++) begin
      en = 1'b1; ip = EX_BITS[7-t]; err_mask = (t == 0) ? 3'b001 : 3'b000;
      #1;
      check(tx_sym == EX_SYMS[t], $sformatf("example symbol %0d: %b expected %b",
                                            t, tx_sym, EX_SYMS[t]));
      if (t == 0) begin
        check(rx_sym == 3'b001, "example: corrupted first symbol");
        n_err++;
      end
      if (best_metric != 0) n_norm++;
      @(posedge clk); #1;
      en = 1'b0; err_mask = '0;
    end
    check(survivor == EX_BITS, $sformatf("example decoded %b expected %b", survivor, EX_BITS));
    $display("example: decoded %b, best state %0d", survivor, best_state);
    check(out_valid && out_bit == EX_BITS[7], "example: first streamed bit");

    // 2. Long stream with idle cycles, isolated errors and one restart.
    accepted = 0; since_err = 0;
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      logic u;
      logic [2:0] mask;
      if (n == 2000) begin                         // restart mid-stream
        en = 1'b1; ip = 1'b1; rst = 1'b1;
        @(posedge clk); #1;
        rst = 1'b0; en = 1'b0;
        sent.delete();
        accepted = 0;
        n_restart++;
        check(out_valid == 1'b0 && best_metric == 0 && best_state == 0, "state after restart");
      end
      while ($urandom_range(0, 6) == 0) begin
        @(posedge clk); #1;
        n_idle++;
        check(out_valid == 1'b0, "out_valid while idle");
      end
      u = 1'($urandom);
      since_err++;
      mask = '0;
      if (since_err >= 12 && $urandom_range(0, 2) == 0) begin
        int eb;
        eb = int'($urandom_range(0, 2));
        mask[eb] = 1'b1;
        since_err = 0;
      end
      sent.push_back(u);
      step(u, mask);
      accepted++;
      check(out_valid == (accepted >= int'(SURV_LEN)), $sformatf("out_valid after %0d bits", accepted));
      if (out_valid) begin
        int   idx;
        logic expected;
        idx = accepted - int'(SURV_LEN);
        expected = sent[idx];
        check(out_bit == expected, $sformatf("bit %0d decoded %b sent %b", idx, out_bit, expected));
        n_out++;
      end
    end

    $display("mechanisms: corrected errors %0d, normalisations %0d, upper-path selections %0d, idle cycles %0d, streamed bits %0d, restarts %0d",
             n_err, n_norm, n_upper, n_idle, n_out, n_restart);
    check(n_err > 0, "no channel error was corrected");
    check(n_norm > 0, "no normalisation happened");
    check(n_upper > 0, "no survivor came from the upper predecessor");
    check(n_idle > 0, "no idle cycle");
    check(n_out > 0, "no streamed output");
    check(n_restart > 0, "no restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
