// smu_re_tb: self-checking testbench for smu_re.
//
// Drives random decision vectors, enables and read-out states for 2000
// cycles and compares survivor and out_bit with a reference model of the
// 16 survivor registers: on an enabled clock new state s takes the register
// of state (s>>1) + 8*dec[s], shifted left, with s[0] appended. Also checks
// that reset clears every register.
module smu_re_tb;

  localparam int unsigned SURV_LEN = 8;

  logic                clk = 1'b0;
  logic                rst, en;
  logic [15:0]         dec;
  logic [3:0]          sel_state;
  logic [SURV_LEN-1:0] survivor;
  logic                out_bit;
  logic [SURV_LEN-1:0] model [16];
  int                  checks = 0, failures = 0;

  smu_re #(.SURV_LEN(SURV_LEN)) dut (
    .clk(clk), .rst(rst), .en(en), .dec(dec), .sel_state(sel_state),
    .survivor(survivor), .out_bit(out_bit));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all(string what);
    for (int s = 0; s < 16; s++) begin
      sel_state = 4'(s);
      #1;
      checks++;
      if (survivor !== model[s] || out_bit !== model[s][SURV_LEN-1]) begin
        failures++;
        $display("FAIL %s: state %0d survivor %b out %b, expected %b", what, s,
                 survivor, out_bit, model[s]);
      end
    end
  endtask

  initial begin
    logic [SURV_LEN-1:0] next [16];
    rst = 1'b1; en = 1'b0; dec = '0; sel_state = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int s = 0; s < 16; s++) model[s] = '0;
    compare_all("reset");
    for (int n = 0; n < 2000; n++) begin
      en  = ($urandom_range(0, 3) != 0);
      dec = 16'($urandom);
      @(posedge clk); #1;
      if (en) begin
        en = 1'b0;
        for (int s = 0; s < 16; s++)
          next[s] = {model[(s >> 1) + (dec[s] ? 8 : 0)][SURV_LEN-2:0], 1'(s & 1)};
        model = next;
      end
      if (n % 50 == 0) compare_all($sformatf("cycle %0d", n));
      else begin
        int s;
        s = int'($urandom_range(0, 15));
        sel_state = 4'(s);
        #1;
        checks++;
        if (survivor !== model[s] || out_bit !== model[s][SURV_LEN-1]) begin
          failures++;
          $display("FAIL cycle %0d: state %0d survivor %b expected %b", n, s, survivor, model[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
