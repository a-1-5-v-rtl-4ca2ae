// tb_sine_converter: exhaustive check of the phase-to-amplitude converter.
// Every one of the 16384 phases is applied and the output, two clocks later,
// is compared with 2047 * sin(2 pi (phase + 1/2) / 16384) computed in
// floating point; the error must stay within 1.1 LSB.  It also checks the
// odd symmetry of the output and the two-clock latency.  Finally the
// spurious-free dynamic range of one full period of the output (phase step 1)
// is computed with a direct DFT over the odd bins (even bins vanish by the
// half-wave symmetry checked before); it must be at least 87 dBc.
module tb_sine_converter;
  logic        clk = 1'b0, rst_n;
  logic [13:0] phase;
  logic signed [11:0] sine;
  int checks = 0, failures = 0;
  real ideal, err, worst;
  logic signed [11:0] out_tab [16384];
  real cos_tab [16384], sin_tab [16384];
  real re, im, pk, sig, sfdr;

  sine_converter dut (.clk, .rst_n, .phase, .sine);

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; phase = '0; worst = 0.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // latency: phase = 4096 (peak) applied at one edge is visible two edges later
    phase = 14'd4096;
    @(posedge clk); #1;
    phase = 14'd0;
    checks++;
    if (sine > 12'sd100) begin failures++; $display("FAIL latency: output after 1 clock"); end
    @(posedge clk); #1;
    checks++;
    if (sine < 12'sd2040) begin failures++; $display("FAIL latency: peak not seen after 2 clocks (%0d)", sine); end
    // exhaustive sweep, pipelined
    for (int p = 0; p < 16384 + 1; p++) begin
      phase = 14'(p);
      @(posedge clk); #1;
      if (p >= 1) begin  // the output now holds phase p-1
        ideal = 2047.0 * $sin(2.0 * 3.14159265358979 * (real'(p - 1) + 0.5) / 16384.0);
        err = real'(sine) - ideal;
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        out_tab[p-1] = sine;
        checks++;
        if (err > 1.1) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d: %0d, ideal %f", p - 1, sine, ideal);
        end
      end
    end
    // odd symmetry: sin(x + pi) = -sin(x)
    for (int p = 0; p < 8192; p++) begin
      checks++;
      if (out_tab[p] !== -out_tab[p + 8192]) begin
        failures++;
        if (failures < 10) $display("FAIL symmetry at %0d", p);
      end
    end
    // SFDR by direct DFT, odd bins 1 .. 8191
    for (int n = 0; n < 16384; n++) begin
      cos_tab[n] = $cos(2.0 * 3.14159265358979 * real'(n) / 16384.0);
      sin_tab[n] = $sin(2.0 * 3.14159265358979 * real'(n) / 16384.0);
    end
    pk = 0.0; sig = 0.0;
    for (int k = 1; k < 8192; k += 2) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < 16384; n++) begin
        re += real'(out_tab[n]) * cos_tab[(n * k) & 16383];
        im += real'(out_tab[n]) * sin_tab[(n * k) & 16383];
      end
      if (k == 1) sig = re * re + im * im;
      else if (re * re + im * im > pk) pk = re * re + im * im;
    end
    sfdr = 10.0 * $log10(sig / pk);
    $display("SFDR %f dBc", sfdr);
    checks++;
    if (sfdr < 87.0) begin failures++; $display("FAIL SFDR %f dBc", sfdr); end
    $display("worst error %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
