// tb_phase_accumulator: checks the 32-bit phase accumulator against a
// software accumulator, cycle by cycle, with random increments, and checks
// that the overflow rate equals delta_p * f_s / 2^32 (eq. f_out) for a fixed
// increment.
module tb_phase_accumulator;
  logic        clk = 1'b0, rst_n;
  logic [31:0] delta_p;
  logic [13:0] phase;
  int checks = 0, failures = 0;
  longint unsigned model;
  int wraps;
  logic [13:0] prev;

  phase_accumulator dut (.clk, .rst_n, .delta_p, .phase);

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [13:0] exp, input string what);
    checks++;
    if (phase !== exp) begin
      failures++;
      $display("FAIL %s: phase=%h expected %h", what, phase, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; delta_p = 32'h0;
    repeat (2) @(posedge clk);
    #1 check(14'h0, "reset");
    rst_n = 1'b1;
    model = 0;
    // random increments
    for (int i = 0; i < 5000; i++) begin
      delta_p = $urandom;
      @(posedge clk);
      model = (model + delta_p) & 64'hFFFF_FFFF;
      #1 check(model[31:18], "random");
    end
    // overflow rate: delta_p = 2^32 * 3 / 64 -> 3 wraps every 64 cycles
    delta_p = 32'd3 << 26;
    wraps = 0;
    @(posedge clk); #1 prev = phase;
    for (int i = 0; i < 6400; i++) begin
      @(posedge clk); #1;
      if (phase < prev) wraps++;
      prev = phase;
    end
    checks++;
    if (wraps != 300) begin
      failures++;
      $display("FAIL overflow rate: %0d wraps in 6400 cycles, expected 300", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
