// viterbi_decoder_tb: self-checking testbench for viterbi_decoder.
//
// Part 1, short frames: 300 frames of 8 random bits, each after a reset,
// encoded by the reference encoder with 0 to 3 random bit errors. After every
// symbol the decoder's best metric (plus the amounts removed by
// normalisation, which the testbench adds up) must equal the smallest
// distance found by a brute-force search over all input sequences of that
// length, and the survivor it reports must achieve that distance. Frames
// with at most one error must decode to the bits sent.
// Part 2, a stream: 3000 random bits with random idle cycles and isolated
// single-bit errors (at least 12 symbols apart). Every decoded bit must equal
// the bit sent SURV_LEN symbols earlier, out_valid must first rise the cycle
// after the SURV_LEN-th symbol and then once per accepted symbol.
module viterbi_decoder_tb;
  import viterbi_ref_pkg::*;

  localparam int unsigned PM_W     = 6;
  localparam int unsigned SURV_LEN = 8;

  logic                clk = 1'b0;
  logic                rst, in_valid;
  logic [2:0]          rx_sym;
  logic [SURV_LEN-1:0] survivor;
  logic                out_valid, out_bit;
  logic [3:0]          best_state;
  logic [PM_W-1:0]     best_metric;
  int                  checks = 0, failures = 0;

  viterbi_decoder #(.PM_W(PM_W), .SURV_LEN(SURV_LEN)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .rx_sym(rx_sym),
    .survivor(survivor), .out_valid(out_valid), .out_bit(out_bit),
    .best_state(best_state), .best_metric(best_metric));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic do_reset();
    rst = 1'b1; in_valid = 1'b0; rx_sym = '0;
    @(posedge clk); #1;
    rst = 1'b0;
  endtask

  // Part 1
  task automatic run_frames(int nframes);
    for (int f = 0; f < nframes; f++) begin
      logic [7:0] bits;
      logic [2:0] rx [32];
      logic [3:0] past;
      int nerr, norm;
      bits = 8'($urandom);
      nerr = int'($urandom_range(0, 3));
      past = '0;
      for (int t = 0; t < 32; t++) rx[t] = '0;
      for (int t = 0; t < 8; t++) begin
        rx[t] = ref_symbol(bits[7-t], past);
        past  = {past[2:0], bits[7-t]};
      end
      for (int e = 0; e < nerr; e++) begin
        int et, eb;
        et = int'($urandom_range(0, 7));
        eb = int'($urandom_range(0, 2));
        rx[et][eb] ^= 1'b1;
      end
      do_reset();
      norm = 0;
      for (int t = 0; t < 8; t++) begin
        int ml;
        norm += int'(best_metric);          // subtracted at this step
        in_valid = 1'b1; rx_sym = rx[t];
        @(posedge clk); #1;
        in_valid = 1'b0;
        ml = ref_ml_dist(t + 1, rx);
        check(int'(best_metric) + norm == ml,
              $sformatf("frame %0d step %0d: metric %0d+%0d, ML distance %0d",
                        f, t, best_metric, norm, ml));
        check(ref_seq_dist(32'(survivor) & ((32'd1 << (t + 1)) - 1), t + 1, rx) == ml,
              $sformatf("frame %0d step %0d: survivor %b is not a best path", f, t, survivor));
      end
      if (nerr <= 1)
        check(survivor == bits, $sformatf("frame %0d: decoded %b sent %b (%0d errors)",
                                          f, survivor, bits, nerr));
    end
  endtask

  // Part 2
  task automatic run_stream(int nbits);
    logic [3:0] past;
    logic       sent [$];
    int         accepted, outs, since_err;
    do_reset();
    past = '0; accepted = 0; outs = 0; since_err = 0;
    for (int n = 0; n < nbits; n++) begin
      logic u;
      logic [2:0] y;
      while ($urandom_range(0, 5) == 0) begin   // idle cycles
        in_valid = 1'b0;
        @(posedge clk); #1;
        check(out_valid == 1'b0, "out_valid during idle");
      end
      u = 1'($urandom);
      y = ref_symbol(u, past);
      past = {past[2:0], u};
      since_err++;
      if (since_err >= 12 && $urandom_range(0, 3) == 0) begin
        int eb;
        eb = int'($urandom_range(0, 2));
        y[eb] ^= 1'b1;
        since_err = 0;
      end
      sent.push_back(u);
      in_valid = 1'b1; rx_sym = y;
      @(posedge clk); #1;
      in_valid = 1'b0;
      accepted++;
      check(out_valid == (accepted >= int'(SURV_LEN)),
            $sformatf("stream symbol %0d: out_valid %b", accepted, out_valid));
      if (out_valid) begin
        int  idx;
        logic expected;
        idx = accepted - int'(SURV_LEN);
        expected = sent[idx];
        check(out_bit == expected,
              $sformatf("stream bit %0d: decoded %b sent %b", idx, out_bit, expected));
        outs++;
      end
    end
    check(outs == nbits - int'(SURV_LEN) + 1, $sformatf("%0d outputs for %0d bits", outs, nbits));
  endtask

  initial begin
    run_frames(300);
    run_stream(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
