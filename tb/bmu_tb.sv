// bmu_tb: self-checking testbench for bmu.
//
// For each of the 8 possible received symbols it checks all 8 branch metrics
// against the Hamming distance to the reference encoder's symbol for the
// branch from state j with input 0. It also checks, for every butterfly, that
// the other three branches' metrics are what the shared metric implies:
// the j->2j+1 and (j+8)->2j branches have 3 - bm[j], the (j+8)->2j+1 branch
// has bm[j].
module bmu_tb;
  import viterbi_ref_pkg::*;

  logic [2:0]      rx_sym;
  logic [7:0][1:0] bm;
  int              checks = 0, failures = 0;

  bmu dut (.rx_sym(rx_sym), .bm(bm));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      rx_sym = 3'(r);
      #1;
      for (int j = 0; j < 8; j++) begin
        int d00, d01, d10, d11;
        d00 = ref_dist(rx_sym, ref_symbol(1'b0, 4'(j)));
        d01 = ref_dist(rx_sym, ref_symbol(1'b1, 4'(j)));
        d10 = ref_dist(rx_sym, ref_symbol(1'b0, 4'(j + 8)));
        d11 = ref_dist(rx_sym, ref_symbol(1'b1, 4'(j + 8)));
        checks++;
        if (int'(bm[j]) != d00) begin
          failures++;
          $display("FAIL rx=%b bm[%0d]=%0d expected %0d", rx_sym, j, bm[j], d00);
        end
        checks++;
        if (3 - int'(bm[j]) != d01 || 3 - int'(bm[j]) != d10 || int'(bm[j]) != d11) begin
          failures++;
          $display("FAIL rx=%b butterfly %0d: bm=%0d other branches %0d %0d %0d",
                   rx_sym, j, bm[j], d01, d10, d11);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
