// pmu_tb: self-checking testbench for pmu.
//
// Checks the reset values (state 0 at 0, the others at 16), then for 2000
// cycles drives random new metrics that are, like real ACS outputs, at least
// the current minimum and at most 15 above it, with en random. A reference
// copy of the stored metrics checks that each enabled clock stores
// pm_new - previous minimum and that a disabled clock holds, and that
// best_state / best_metric are the minimum with ties to the lower state.
module pmu_tb;

  localparam int unsigned PM_W = 6;

  logic                  clk = 1'b0;
  logic                  rst, en;
  logic [15:0][PM_W-1:0] pm_new, pm;
  logic [3:0]            best_state;
  logic [PM_W-1:0]       best_metric;
  int                    model [16];
  int                    checks = 0, failures = 0;

  pmu #(.PM_W(PM_W)) dut (
    .clk(clk), .rst(rst), .en(en), .pm_new(pm_new), .pm(pm),
    .best_state(best_state), .best_metric(best_metric));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    int bs, bm;
    bs = 0; bm = model[0];
    for (int s = 1; s < 16; s++) if (model[s] < bm) begin bm = model[s]; bs = s; end
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (int'(pm[s]) != model[s]) begin
        failures++;
        $display("FAIL %s: pm[%0d]=%0d expected %0d", what, s, pm[s], model[s]);
      end
    end
    checks++;
    if (int'(best_state) != bs || int'(best_metric) != bm) begin
      failures++;
      $display("FAIL %s: best %0d/%0d expected %0d/%0d", what, best_state, best_metric, bs, bm);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; pm_new = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int s = 0; s < 16; s++) model[s] = (s == 0) ? 0 : 16;
    compare("reset");
    for (int n = 0; n < 2000; n++) begin
      int mn;
      mn = model[0];
      for (int s = 1; s < 16; s++) if (model[s] < mn) mn = model[s];
      en = ($urandom_range(0, 4) != 0);
      // Keep at least one new metric near the minimum, like a real trellis.
      for (int s = 0; s < 16; s++) pm_new[s] = PM_W'(mn + int'($urandom_range(0, 15)));
      pm_new[$urandom_range(0, 15)] = PM_W'(mn + int'($urandom_range(0, 3)));
      @(posedge clk); #1;
      if (en) for (int s = 0; s < 16; s++) model[s] = int'(pm_new[s]) - mn;
      compare($sformatf("cycle %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
