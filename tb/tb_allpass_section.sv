// tb_allpass_section: checks the all-pass section against its transfer
// function G(z) = (c z^-1 - z^-2) / (1 - c z^-1) evaluated in floating point,
//     y(n) = c y(n-1) + c x(n-1) - x(n-2),
// for several tuning words.  The hardware truncates c*a, so its output may
// differ from the exact recursion by a bounded amount, 1/(1-|c|) + 1 LSB.  For
// c = 0 the section is exactly y(n) = -x(n-2); for c = 1 (not representable,
// nearest 31/32) it approaches a delay.  A final test drives large inputs and
// checks that the output saturates instead of wrapping..
module tb_allpass_section;
  localparam int W = 14;
  logic clk = 1'b0, rst_n;
  logic signed [5:0]   cos_k;
  logic signed [W-1:0] x, y;
  int checks = 0, failures = 0;
  real c, yr, yr1, x1, x2, tol, d;
  int ks [5] = '{0, 16, -16, 31, -32};

  allpass_section #(.W(W), .COS_W(6)) dut (.clk, .rst_n, .cos_k, .x, .y);

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; cos_k = '0;
    foreach (ks[t]) begin
      rst_n = 1'b0;
      cos_k = 6'(ks[t]);
      c = real'(ks[t]) / 32.0;
      tol = 1.0 / (1.0 - ((c < 0) ? -c : c)) + 1.0;
      x = '0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      yr = 0.0; x1 = 0.0; x2 = 0.0;
      for (int n = 0; n < 2000; n++) begin
        // small random input keeps the exact recursion inside the word
        x = 14'($signed(10'($urandom)));
        @(posedge clk); #1;
        // after this edge, y holds y(n+1) = c y(n) + c x(n) - x(n-1)
        yr1 = c * yr + c * real'(x) - x1;
        x2 = x1; x1 = real'(x); yr = yr1;
        d = real'(y) - yr;
        if (d < 0) d = -d;
        checks++;
        if (d > tol) begin
          failures++;
          if (failures < 10) $display("FAIL c=%f n=%0d: y=%0d exact %f", c, n, y, yr);
        end
      end
    end
    // saturation: c = 31/32, input +8191, -8191: the exact second output is
    // c*(-8191 + c*8191) - 8191 = -8439.8, which must clip to -8192, not wrap
    rst_n = 1'b0; cos_k = 6'sd31; x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    x = 14'sd8191;
    @(posedge clk); #1;
    checks++;
    if (y != 14'sd7935) begin failures++; $display("FAIL first output %0d", y); end
    x = -14'sd8191;
    @(posedge clk); #1;
    checks++;
    if (y != -14'sd8192) begin failures++; $display("FAIL saturation: %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
