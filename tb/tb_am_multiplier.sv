// tb_am_multiplier: checks floor(sine * amp / 4096) for random and extreme
// operands, and the one-clock latency.
module tb_am_multiplier;
  logic clk = 1'b0, rst_n;
  logic signed [11:0] sine, dout;
  logic [11:0] amp;
  int checks = 0, failures = 0;
  longint prod, exp, prev_exp;

  am_multiplier dut (.clk, .rst_n, .sine, .amp, .dout);

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; sine = '0; amp = '0; prev_exp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 6000; i++) begin
      case (i % 4)
        0: begin sine = -12'sd2048; amp = 12'hFFF; end
        default: begin sine = 12'($urandom); amp = 12'($urandom); end
      endcase
      if (i == 1) begin sine = 12'sd2047; amp = 12'hFFF; end
      prod = longint'(sine) * longint'(amp);
      exp  = (prod >= 0) ? prod / 4096 : -((-prod + 4095) / 4096);   // floor
      #1;
      checks++;
      if (dout !== 12'(prev_exp)) begin failures++; $display("FAIL latency"); end
      @(posedge clk); #1;
      checks++;
      if (dout !== 12'(exp)) begin
        failures++;
        $display("FAIL %0d * %0d: %0d, expected %0d", sine, amp, dout, exp);
      end
      prev_exp = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
