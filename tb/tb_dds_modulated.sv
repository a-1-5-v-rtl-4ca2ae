// tb_dds_modulated: modulated-carrier workloads through the whole synthesizer
// at its default sizes, with the modulator notch tuned to the carrier
// (f_s = 200 MHz):
//   - two tones 200 kHz apart around 76 MHz (cos_k = -23), made by amplitude
//     and phase modulation of one carrier: A(n) = |cos(dw n)|, P(n) = 0 or pi;
//   - 16-QAM at 390.625 kBd (512 clocks per symbol) with root-raised-cosine
//     pulses, roll-off 0.22, on a 76.8 MHz carrier (cos_k = -24);
//   - 8-PSK with 3pi/8 rotation at about 270.8 kBd (738 clocks per symbol) on
//     a 50 MHz carrier (cos_k = 0); the same root-raised-cosine pulse stands in
//     for the EDGE pulse shape.
// The testbench forms the complex baseband b(n), converts it to the polar
// inputs amp_mod = |b| and phase_mod = arg(b), and drives the synthesizer.
// The 1-bit output is mixed down with the carrier and low-pass filtered (two
// cascaded 128-tap moving averages).  The ideal carrier built from the
// applied inputs, scaled by 1/1843 (the modulator's signal gain) and delayed
// by 10 clocks (5 clocks of pipeline and about 5 of modulator group delay),
// goes through the same mixer and filter.  After fitting one complex gain
// (the modulator's signal transfer at the notch), the gain magnitude must be
// 1 within 4 % and the residual at least 40 dB below the signal.
module tb_dds_modulated;
  import dds_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  L  = 128;

  logic        clk = 1'b0, rst_n;
  freq_word_t  delta_p;
  phase_t      phase_mod;
  amp_t        amp_mod;
  cos_t        cos_k;
  sample_t     sine, dsm_in;
  logic        dsm_bit, dac_sw_p, dac_sw_n;
  logic [15:0] dac_iout_p, dac_iout_n;

  dds_top dut (.*);

  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // root-raised-cosine pulse, t in symbols
  function automatic real rrc(input real t, input real a);
    real x;
    if (t > -1e-9 && t < 1e-9) return 1.0 - a + 4.0 * a / PI;
    x = 4.0 * a * t;
    if (x > 1.0 - 1e-6 && x < 1.0 + 1e-6 || x < -1.0 + 1e-6 && x > -1.0 - 1e-6)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a))
                               + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a)))
           / (PI * t * (1.0 - x * x));
  endfunction

  // moving-average stage: running sum over the last L inputs
  typedef struct { real buf_r [L]; real sum; int idx; } mavg_t;
  function automatic real mavg(inout mavg_t m, input real v);
    m.sum = m.sum - m.buf_r[m.idx] + v;
    m.buf_r[m.idx] = v;
    m.idx = (m.idx + 1) % L;
    return m.sum / real'(L);
  endfunction

  mavg_t f_yr1, f_yr2, f_yi1, f_yi2, f_rr1, f_rr2, f_ri1, f_ri2;
  real   sym_i [0:255], sym_q [0:255];
  real   hist_ref [0:15];

  task automatic run(input string name, input real f_norm, input logic signed [5:0] ck,
                     input int kind, input int sps, input int nsym, input real amax);
    logic [31:0] dp;
    real bi, bq, mag, ang, t, p, w, s, ref_s, yr, yi, rr, ri;
    real srr, sri, syy, sgg_r, sgg_i, gr, gi, err, ratio, gmag, pw;
    int  nsamp, n0;
    logic [11:0] am;
    logic [13:0] pm;
    real ph_applied, a_applied;
    dp = 32'($rtoi(f_norm * 4294967296.0 + 0.5));
    for (int k = 0; k < 256; k++) begin
      if (kind == 1) begin            // 16-QAM, levels -3,-1,1,3
        sym_i[k] = real'(2 * int'($urandom_range(3, 0)) - 3) / 3.0;
        sym_q[k] = real'(2 * int'($urandom_range(3, 0)) - 3) / 3.0;
      end else begin                  // 8-PSK with 3pi/8 rotation
        p = 2.0 * PI * real'($urandom_range(7, 0)) / 8.0 + 3.0 * PI / 8.0 * real'(k);
        sym_i[k] = $cos(p);
        sym_q[k] = $sin(p);
      end
    end
    f_yr1 = '{default: 0}; f_yr2 = '{default: 0}; f_yi1 = '{default: 0}; f_yi2 = '{default: 0};
    f_rr1 = '{default: 0}; f_rr2 = '{default: 0}; f_ri1 = '{default: 0}; f_ri2 = '{default: 0};
    for (int k = 0; k < 16; k++) hist_ref[k] = 0.0;
    srr = 0; sri = 0; syy = 0; sgg_r = 0; sgg_i = 0;
    nsamp = nsym * sps;
    n0 = 8 * sps;                     // skip the filter and pulse start-up
    cos_k = ck; delta_p = dp;
    for (int n = 0; n < nsamp; n++) begin
      // complex baseband
      if (kind == 0) begin
        bi = $cos(2.0 * PI * 100.0e3 / 200.0e6 * real'(n)); bq = 0.0;
      end else begin
        t = real'(n) / real'(sps);
        bi = 0.0; bq = 0.0;
        for (int k = int'(t) - 4; k <= int'(t) + 4; k++)
          if (k >= 0 && k < 256) begin
            w  = rrc(t - real'(k), 0.22);
            bi += w * sym_i[k];
            bq += w * sym_q[k];
          end
      end
      mag = $sqrt(bi * bi + bq * bq) * amax;
      if (mag > 4095.0) mag = 4095.0;
      ang = $atan2(bq, bi);
      am  = 12'($rtoi(mag + 0.5));
      pm  = 14'($rtoi($floor(ang / (2.0 * PI) * 16384.0 + 0.5)));
      amp_mod = am; phase_mod = pm;
      // ideal output of the applied inputs, 5 clocks later (pipeline)
      a_applied  = 2047.0 * real'(am) / 4096.0;
      ph_applied = 2.0 * PI * real'(pm) / 16384.0;
      for (int k = 15; k > 0; k--) hist_ref[k] = hist_ref[k-1];
      hist_ref[0] = a_applied * $sin(2.0 * PI * f_norm * real'(n + 5) + ph_applied);
      @(posedge clk); #1;
      // mix down: bit stream and reference (which is already aligned to n)
      s     = dsm_bit ? 1.0 : -1.0;
      ref_s = hist_ref[10] / 1843.0;   // 5 clocks pipeline + about 5 modulator group delay
      p  = 2.0 * PI * f_norm * real'(n);
      yr = mavg(f_yr2, mavg(f_yr1, s * $cos(p)));
      yi = mavg(f_yi2, mavg(f_yi1, -s * $sin(p)));
      rr = mavg(f_rr2, mavg(f_rr1, ref_s * $cos(p)));
      ri = mavg(f_ri2, mavg(f_ri1, -ref_s * $sin(p)));
      if (n >= n0) begin
        // least-squares complex gain y = g r
        srr += rr * rr + ri * ri;
        sgg_r += yr * rr + yi * ri;
        sgg_i += yi * rr - yr * ri;
        syy += yr * yr + yi * yi;
      end
    end
    gr = sgg_r / srr; gi = sgg_i / srr;
    gmag = $sqrt(gr * gr + gi * gi);
    // residual power = syy - |g|^2 srr
    err = syy - gmag * gmag * srr;
    pw  = gmag * gmag * srr;
    ratio = 10.0 * $log10(pw / ((err > 1e-30) ? err : 1e-30));
    $display("%s: carrier %f MHz, cos_k %0d, gain %f (phase %f rad), signal/residual %f dB",
             name, 200.0 * f_norm, ck, gmag, $atan2(gi, gr), ratio);
    checks++;
    if (gmag < 0.96 || gmag > 1.04) begin failures++; $display("FAIL %s: gain", name); end
    checks++;
    if (ratio < 40.0) begin failures++; $display("FAIL %s: residual too large", name); end
  endtask

  initial begin
    rst_n = 1'b0; delta_p = '0; phase_mod = '0; amp_mod = '0; cos_k = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run("two-tone 76 MHz", 76.0 / 200.0,  -6'sd23, 0, 2048, 40, 2000.0);
    run("16-QAM 76.8 MHz", 76.8 / 200.0,  -6'sd24, 1, 512, 64, 1400.0);
    run("8-PSK 50 MHz",    50.0 / 200.0,   6'sd0,  2, 738, 48, 1600.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
