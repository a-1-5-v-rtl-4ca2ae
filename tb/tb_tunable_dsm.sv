// tb_tunable_dsm: checks the tunable band-pass delta-sigma modulator.
//
// For every tuning word c = k/32, k = -31 .. 31, a sine of amplitude 1000 LSB is applied
// exactly at the notch frequency w0 = acos(c).  Three things are checked:
//  1. bit-exactness against a reference model of the loop written here
//     directly from its difference equations (all-pass y(n+1) = c(x+y) - x(n-1),
//     saturating stage sums, feedback levels 1843/533/102);
//  2. the signal transfer: at the notch the 1-bit stream (+-1) must carry the
//     input tone with amplitude 1000/1843, measured by a Hann-windowed
//     correlation over 16384 samples (within 3 %);
//  3. noise shaping: the spectrum a few bins away from the tone, inside the
//     band of an oversampling ratio of 64 (24 bins), must be far below the
//     spectrum 0.3 rad away from the notch, on the side away from its mirror
//     image at -w0 (out of band).
// The count of tuning words exercised is also checked (mode switches).
// Bit-exact failures are printed for the first few only.
module tb_tunable_dsm;
  localparam int N = 16384, WARM = 512;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n;
  logic signed [5:0]  cos_k;
  logic signed [11:0] din;
  logic dout;
  int checks = 0, failures = 0, tunings = 0;
  int ks [63];                       // every tuning word except -32 (tone at f_s/2)

  tunable_dsm dut (.clk, .rst_n, .cos_k, .din, .dout);

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int m_xd [3], m_y [3];
  int wl [3] = '{14, 12, 10};
  int dl [3] = '{1843, 533, 102};

  function automatic int clip(input int v, input int w);
    int hi = (1 << (w - 1)) - 1;
    int lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int floor_div(input int a, input int b);   // b > 0
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  // one model step; returns the output bit of this cycle
  function automatic bit model_step(input int k, input int u);
    int inp [3], w [3], nxd [3], ny [3];
    bit v = (m_y[2] >= 0);
    inp[0] = u;
    inp[1] = floor_div(m_y[0], 16) - floor_div(m_y[2], 32);
    inp[2] = floor_div(m_y[1], 16);
    for (int s = 0; s < 3; s++) begin
      w[s]   = clip(inp[s] + (v ? -dl[s] : dl[s]) + m_y[s], wl[s]);
      ny[s]  = clip(floor_div(k * (w[s] + m_y[s]), 32) - m_xd[s], wl[s]);
      nxd[s] = w[s];
    end
    m_y = ny; m_xd = nxd;
    return v;
  endfunction

  real w0, sr, si, br, bi, orr, oi, win, amp, inband, outband, ph, expected;
  bit  mbit;

  initial begin
    for (int i = 0; i < 63; i++) ks[i] = i - 31;
    din = '0; cos_k = '0;
    foreach (ks[t]) begin
      rst_n = 1'b0;
      cos_k = 6'(ks[t]);
      w0 = $acos(real'(ks[t]) / 32.0);
      tunings++;
      m_xd = '{0, 0, 0}; m_y = '{0, 0, 0};
      din = '0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      sr = 0; si = 0; br = 0; bi = 0; orr = 0; oi = 0;
      for (int n = 0; n < N + WARM; n++) begin
        din = 12'($rtoi($floor(1000.0 * $sin(w0 * real'(n)) + 0.5)));
        mbit = model_step(ks[t], int'(din));
        checks++;
        if (dout !== mbit) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d n=%0d: dout=%0b model=%0b", ks[t], n, dout, mbit);
        end
        if (n >= WARM) begin
          win = 0.5 - 0.5 * $cos(2.0 * PI * real'(n - WARM) / real'(N));
          ph  = w0 * real'(n);
          sr += win * (dout ? 1.0 : -1.0) * $cos(ph);
          si += win * (dout ? 1.0 : -1.0) * $sin(ph);
          ph  = (w0 + 2.0 * PI * 24.0 / real'(N)) * real'(n);       // in band, 24 bins off
          br += win * (dout ? 1.0 : -1.0) * $cos(ph);
          bi += win * (dout ? 1.0 : -1.0) * $sin(ph);
          ph  = (w0 + ((w0 > PI / 2.0) ? -0.3 : 0.3)) * real'(n);      // out of band, 0.3 rad off
          orr += win * (dout ? 1.0 : -1.0) * $cos(ph);
          oi  += win * (dout ? 1.0 : -1.0) * $sin(ph);
        end
        @(posedge clk); #1;
      end
      amp      = 4.0 / real'(N) * $sqrt(sr * sr + si * si);
      inband   = 4.0 / real'(N) * $sqrt(br * br + bi * bi);
      outband  = 4.0 / real'(N) * $sqrt(orr * orr + oi * oi);
      expected = 1000.0 / 1843.0;
      if (t % 8 == 0 || amp < 0.97 * expected || amp > 1.03 * expected)
        $display("k=%0d f0/fs=%f tone %f (expect %f) in-band bin %f out-of-band bin %f",
               ks[t], w0 / (2.0 * PI), amp, expected, inband, outband);
      checks++;
      if (amp < 0.97 * expected || amp > 1.03 * expected) begin
        failures++; $display("FAIL k=%0d: tone amplitude %f", ks[t], amp);
      end
      checks++;
      if (!(inband < 0.002 && outband > 5.0 * inband)) begin
        failures++; $display("FAIL k=%0d: no noise shaping around the notch (in-band %f, out-of-band %f)", ks[t], inband, outband);
      end
    end
    checks++;
    if (tunings != 63) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
