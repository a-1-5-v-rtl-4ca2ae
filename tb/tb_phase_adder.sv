// tb_phase_adder: checks the registered modulo-2^14 phase-modulation adder
// with random operands, and its one-clock latency.
module tb_phase_adder;
  logic        clk = 1'b0, rst_n;
  logic [13:0] phase_in, phase_mod, phase_out;
  int checks = 0, failures = 0;
  int unsigned exp;

  phase_adder dut (.clk, .rst_n, .phase_in, .phase_mod, .phase_out);

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; phase_in = '0; phase_mod = '0; exp = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      phase_in  = 14'($urandom);
      phase_mod = (i % 7 == 0) ? 14'h3FFF : 14'($urandom);
      #1;
      // latency: the new sum must not appear before the clock edge
      checks++;
      if (phase_out !== 14'(exp)) begin
        failures++;
        $display("FAIL output changed before the clock edge");
      end
      exp = (int'(phase_in) + int'(phase_mod)) % 16384;
      @(posedge clk); #1;
      checks++;
      if (phase_out !== 14'(exp)) begin
        failures++;
        $display("FAIL %h + %h = %h, expected %h", phase_in, phase_mod, phase_out, 14'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
