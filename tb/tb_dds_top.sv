// tb_dds_top: end-to-end test of the synthesizer at its default sizes.
//
// The testbench keeps its own model of the phase path (32-bit accumulator,
// phase-modulation adder, pipeline delays) and checks every clock that
//   - the sine output is within 1.1 LSB of 2047 sin(2 pi (phase + 1/2) / 2^14),
//   - the modulator input is floor(sine * A / 4096) of the previous sine,
//   - the D/A current goes to the side selected by the previous modulator
//     bit, and the D/A switches are never both off.
// Over four constant-frequency segments with the modulator notch tuned to
// the carrier (50, 60, 63.33 and 76.8 MHz at a 200 MHz clock, i.e.
// cos_k = 0, -10, -13 and -24), the 1-bit output must carry the carrier with the
// amplitude expected from the signal transfer of the modulator (input
// amplitude / 1843, within 4 %) and show a deep in-band noise notch.  A
// fourth segment changes frequency (hops of delta_p), phase (quarter-turn
// steps) and amplitude every 64 clocks, as a digital modulator would.  Each
// mechanism (accumulator overflow, frequency change, phase-modulation step,
// amplitude change, notch retuning, all four sine quadrants, D/A switch
// overlap) is counted and must occur at least once.
module tb_dds_top;
  import dds_pkg::*;
  localparam int  NSEG = 8192;
  localparam real PI   = 3.14159265358979;

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
  int n_wrap = 0, n_fm = 0, n_pm = 0, n_am = 0, n_tune = 0, n_overlap = 0, n_bothoff = 0;
  int quad_seen [4] = '{0, 0, 0, 0};

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(dac_sw_p or dac_sw_n) begin
    if (dac_sw_p && dac_sw_n)   n_overlap++;
    if (!dac_sw_p && !dac_sw_n) n_bothoff++;
  end

  // model state (values after the latest clock edge)
  longint unsigned acc;          // accumulator
  logic [13:0] pout, pout_d1, pout_d2;   // adder output and its delays
  logic [31:0] dp_applied;
  logic [13:0] pm_applied;
  logic [11:0] amp_applied;
  sample_t     sine_prev;
  logic        bit_prev;
  int          cycle;

  function automatic void fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endfunction

  // apply inputs for the next edge, step the model through it and check
  task automatic step(input logic [31:0] dp, input logic [13:0] pm, input logic [11:0] am,
                      input logic signed [5:0] ck);
    real ideal, err;
    longint prod, exp_in;
    if (dp != delta_p)   n_fm++;
    if (pm != phase_mod) n_pm++;
    if (am != amp_mod)   n_am++;
    if (ck != cos_k)     n_tune++;
    delta_p = dp; phase_mod = pm; amp_mod = am; cos_k = ck;
    sine_prev = sine;
    bit_prev  = dsm_bit;
    @(posedge clk);
    #1;
    cycle++;
    // model of the edge
    pout_d2 = pout_d1;
    pout_d1 = pout;
    pout    = 14'(acc >> 18) + pm;           // adder uses the accumulator before this edge
    if (acc + dp >= 64'h1_0000_0000) n_wrap++;
    acc     = (acc + dp) & 64'hFFFF_FFFF;
    // sine: phase from two edges back
    if (cycle > 4) begin
      ideal = 2047.0 * $sin(2.0 * PI * (real'(pout_d2) + 0.5) / 16384.0);
      err = real'(sine) - ideal;
      if (err < 0) err = -err;
      checks++;
      if (err > 1.1) fail($sformatf("sine %0d, expected %f", sine, ideal));
      quad_seen[pout_d2[13:12]]++;
      // amplitude modulation of the previous sine
      prod   = longint'(sine_prev) * longint'(am);
      exp_in = (prod >= 0) ? prod / 4096 : -((-prod + 4095) / 4096);
      checks++;
      if (dsm_in !== 12'(exp_in)) fail($sformatf("modulator input %0d, expected %0d", dsm_in, exp_in));
    end
    // D/A: 2.5 ns after the edge the latched previous bit sets the current
    #1.5;
    if (cycle > 8) begin
      checks++;
      if (bit_prev ? (dac_iout_p != 16'd11500) : (dac_iout_n != 16'd11500))
        fail("D/A current on the wrong side");
    end
  endtask

  // run a constant carrier and measure the carrier amplitude in the bit stream
  task automatic tone(input real f_norm, input logic signed [5:0] ck, input logic [11:0] am,
                      input string name);
    logic [31:0] dp;
    real sr, si, br, bi, w, ph, s, a_tone, a_in, expected;
    dp = 32'($rtoi(f_norm * 4294967296.0 + 0.5));
    for (int n = 0; n < 600; n++) step(dp, 14'd0, am, ck);      // settle
    sr = 0; si = 0; br = 0; bi = 0;
    for (int n = 0; n < NSEG; n++) begin
      step(dp, 14'd0, am, ck);
      w  = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(NSEG));
      s  = dsm_bit ? 1.0 : -1.0;
      ph = 2.0 * PI * (real'(dp) / 4294967296.0) * real'(n);
      sr += w * s * $cos(ph);  si += w * s * $sin(ph);
      ph = ph + 2.0 * PI * 16.0 / real'(NSEG) * real'(n);
      br += w * s * $cos(ph);  bi += w * s * $sin(ph);
    end
    a_tone   = 4.0 / real'(NSEG) * $sqrt(sr * sr + si * si);
    a_in     = 2047.0 * real'(am) / 4096.0;
    expected = a_in / 1843.0;
    $display("%s: f_out = %f MHz, cos_k = %0d, carrier %f (expected %f), in-band bin %f",
             name, 200.0 * real'(dp) / 4294967296.0, ck, a_tone, expected,
             4.0 / real'(NSEG) * $sqrt(br * br + bi * bi));
    checks++;
    if (a_tone < 0.96 * expected || a_tone > 1.04 * expected) fail({name, ": carrier amplitude"});
    checks++;
    if (4.0 / real'(NSEG) * $sqrt(br * br + bi * bi) > 0.003) fail({name, ": in-band noise"});
  endtask

  initial begin
    rst_n = 1'b0; delta_p = '0; phase_mod = '0; amp_mod = '0; cos_k = '0;
    acc = 0; pout = '0; pout_d1 = '0; pout_d2 = '0; cycle = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #1.5;
    tone(0.25,                 6'sd0,   12'd2000, "50 MHz");
    tone(0.3,                 -6'sd10,  12'd2000, "60 MHz");
    tone(63.33 / 200.0,       -6'sd13,  12'd2000, "63.33 MHz");
    tone(76.8 / 200.0,        -6'sd24,  12'd1800, "76.8 MHz");
    // digital modulation: frequency hops, phase steps and amplitude changes
    for (int n = 0; n < 4096; n++) begin
      logic [31:0] dp; logic [13:0] pm; logic [11:0] am;
      dp = 32'h2000_0000 + 32'((n / 256) * 32'h0100_0001);
      pm = 14'((n / 64) * 4096);
      am = 12'(1024 + ((n / 64) % 8) * 128);
      step(dp, pm, am, 6'sd22);
    end
    $display("overflows %0d, frequency changes %0d, phase steps %0d, amplitude changes %0d, retunings %0d, quadrants %0d/%0d/%0d/%0d, D/A overlaps %0d, D/A both off %0d",
             n_wrap, n_fm, n_pm, n_am, n_tune, quad_seen[0], quad_seen[1], quad_seen[2], quad_seen[3],
             n_overlap, n_bothoff);
    checks++; if (n_wrap == 0)    fail("no accumulator overflow");
    checks++; if (n_fm < 2)       fail("no frequency change");
    checks++; if (n_pm == 0)      fail("no phase-modulation step");
    checks++; if (n_am == 0)      fail("no amplitude change");
    checks++; if (n_tune < 2)     fail("no notch retuning");
    for (int q = 0; q < 4; q++) begin
      checks++; if (quad_seen[q] == 0) fail("a sine quadrant was never used");
    end
    checks++; if (n_overlap == 0) fail("no D/A switch overlap");
    checks++; if (n_bothoff != 0) fail("D/A switches both off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
