// butterfly_tb: self-checking testbench for butterfly.
//
// Drives every branch metric 0..3 with exhaustive small path metrics (0..15
// for both inputs) and 2000 random larger ones, and compares both new metrics
// and both decision bits with a reference add-compare-select: state 2j takes
// min(a + bm, b + 3 - bm), state 2j+1 takes min(a + 3 - bm, b + bm), ties to
// the upper state a.
module butterfly_tb;

  localparam int unsigned PM_W = 6;

  logic [PM_W-1:0] a, b, o0, o1;
  logic [1:0]      bm;
  logic            d0, d1;
  int              checks = 0, failures = 0;

  butterfly #(.PM_W(PM_W)) dut (
    .imetu_a(a), .imetu_b(b), .bm(bm),
    .ometu_0(o0), .ometu_1(o1), .dec_0(d0), .dec_1(d1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int ia, int ib, int ibm);
    int s0a, s0b, s1a, s1b, e0, e1;
    logic ed0, ed1;
    a = PM_W'(ia); b = PM_W'(ib); bm = 2'(ibm);
    #1;
    s0a = ia + ibm;     s0b = ib + 3 - ibm;
    s1a = ia + 3 - ibm; s1b = ib + ibm;
    ed0 = s0b < s0a;  e0 = ed0 ? s0b : s0a;
    ed1 = s1b < s1a;  e1 = ed1 ? s1b : s1a;
    checks++;
    if (int'(o0) != e0 || int'(o1) != e1 || d0 != ed0 || d1 != ed1) begin
      failures++;
      $display("FAIL a=%0d b=%0d bm=%0d: got %0d/%0d dec %b%b, expected %0d/%0d dec %b%b",
               ia, ib, ibm, o0, o1, d0, d1, e0, e1, ed0, ed1);
    end
  endtask

  initial begin
    for (int ibm = 0; ibm < 4; ibm++)
      for (int ia = 0; ia < 16; ia++)
        for (int ib = 0; ib < 16; ib++)
          check_one(ia, ib, ibm);
    for (int n = 0; n < 2000; n++)
      check_one(int'($urandom_range(0, 60)), int'($urandom_range(0, 60)),
                int'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
