// conv_encoder_tb: self-checking testbench for conv_encoder.
//
// After a one-cycle reset it sends the 8-bit example sequence 0,1,1,0,1,0,1,0
// and compares every symbol with the values worked out by hand from the
// generator equations (000 111 100 110 001 111 101 000); then it sends 400
// random bits, with random idle cycles (en low) in between, and compares each
// symbol with the reference model in viterbi_ref_pkg. The symbol for a bit
// is checked in the cycle the bit is presented (zero latency).
module conv_encoder_tb;
  import viterbi_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, en, ip;
  logic [2:0] op;
  int         checks = 0, failures = 0;

  conv_encoder dut (.clk(clk), .rst(rst), .en(en), .ip(ip), .op(op));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sym(logic [2:0] expected, string what);
    checks++;
    if (op !== expected) begin
      failures++;
      $display("FAIL %s: op=%b expected %b", what, op, expected);
    end
  endtask

  localparam logic [7:0]  EX_BITS = 8'b01101010;   // sent MSB first
  localparam logic [2:0]  EX_SYMS [8] = '{3'b000, 3'b111, 3'b100, 3'b110,
                                          3'b001, 3'b111, 3'b101, 3'b000};

  initial begin
    logic [3:0] past;
    rst = 1'b1; en = 1'b0; ip = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 8; t++) begin
      en = 1'b1; ip = EX_BITS[7-t];
      #1 check_sym(EX_SYMS[t], $sformatf("example symbol %0d", t));
      @(posedge clk); #1;
    end
    // Random bits with idle cycles; continue from the example's history.
    past = {EX_BITS[3], EX_BITS[2], EX_BITS[1], EX_BITS[0]};
    past = {EX_BITS[3:0]};
    for (int t = 0; t < 400; t++) begin
      en = ($urandom_range(0, 3) != 0);
      ip = 1'($urandom);
      #1 check_sym(ref_symbol(ip, past), $sformatf("random symbol %0d", t));
      @(posedge clk); #1;
      if (en) past = {past[2:0], ip};
    end
    // Reset in the middle of a stream returns to the zero state.
    rst = 1'b1; en = 1'b1; ip = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0; ip = 1'b0;
    #1 check_sym(3'b000, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
