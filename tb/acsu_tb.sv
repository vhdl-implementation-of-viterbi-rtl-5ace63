// acsu_tb: self-checking testbench for acsu.
//
// For 3000 random cases it draws a received symbol and 16 random previous
// path metrics, feeds the ACS unit the eight shared branch metrics of that
// symbol, and compares all 16 new metrics and decision bits with a full
// trellis reference that computes all 32 branch metrics directly from the
// reference encoder: new state s has predecessors s>>1 (decision 0) and
// (s>>1)+8 (decision 1), input bit s[0], ties to decision 0.
module acsu_tb;
  import viterbi_ref_pkg::*;

  localparam int unsigned PM_W = 6;

  logic [15:0][PM_W-1:0] pm_in, pm_out;
  logic [7:0][1:0]       bm;
  logic [15:0]           dec;
  int                    checks = 0, failures = 0;

  acsu #(.PM_W(PM_W)) dut (.pm_in(pm_in), .bm(bm), .pm_out(pm_out), .dec(dec));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [2:0] rx;
      rx = 3'($urandom);
      for (int s = 0; s < 16; s++) pm_in[s] = PM_W'($urandom_range(0, 40));
      for (int j = 0; j < 8; j++) bm[j] = 2'(ref_dist(rx, ref_symbol(1'b0, 4'(j))));
      #1;
      for (int s = 0; s < 16; s++) begin
        int p0, p1, m0, m1, e;
        logic u, ed;
        u  = 1'(s & 1);
        p0 = s >> 1;
        p1 = (s >> 1) + 8;
        m0 = int'(pm_in[p0]) + ref_dist(rx, ref_symbol(u, 4'(p0)));
        m1 = int'(pm_in[p1]) + ref_dist(rx, ref_symbol(u, 4'(p1)));
        ed = m1 < m0;
        e  = ed ? m1 : m0;
        checks++;
        if (int'(pm_out[s]) != e || dec[s] != ed) begin
          failures++;
          $display("FAIL case %0d state %0d: pm %0d dec %b, expected %0d dec %b",
                   n, s, pm_out[s], dec[s], e, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
