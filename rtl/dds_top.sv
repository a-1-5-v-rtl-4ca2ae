// dds_top: direct digital synthesizer with a tunable 1-bit delta-sigma D/A
// converter.
//
// Signal chain, one sample per clock:
//   phase_accumulator  32-bit accumulation of delta_p (frequency and frequency
//                      modulation); top 14 bits are the phase
//   phase_adder        + phase_mod (phase modulation, 14 bits)
//   sine_converter     14-bit phase -> 12-bit signed sine (2 clocks)
//   am_multiplier      * amp_mod (amplitude modulation, 12 bits)
//   tunable_dsm        12 bits -> 1 bit, noise notch at acos(cos_k/32)*fs/(2 pi)
//   one_bit_dac        behavioural model of the latch, driver and
//                      current-steering pair (NRZ differential current)
// With phase_mod = P(n) and amp_mod = A(n) the output is
// A(n) * sin(w_out n + P(n)), i.e. quadrature amplitude modulation by the
// polar form of the I/Q data.  The off-chip reconstruction filter is not
// part of this module: iout_p/iout_n are what drives it.
//
// Timing: a change of delta_p reaches the phase after 1 clock, the adder
// output after 2, the sine after 4, the modulator input after 5; dsm_bit
// responds to the modulator input in the following clock and the D/A latch
// takes dsm_bit at the next rising edge.  cos_k tunes the modulator notch and
// is supplied by the user, normally set to cos(2 pi delta_p / 2^32) so that the
// notch sits on the output frequency; how it is derived from delta_p is left
// outside this module.
module dds_top
  import dds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  freq_word_t  delta_p,     // phase increment word (frequency)
  input  phase_t      phase_mod,   // phase modulation word
  input  amp_t        amp_mod,     // amplitude modulation word
  input  cos_t        cos_k,       // cos(theta_o) * 32, modulator tuning
  output sample_t     sine,        // sine converter output
  output sample_t     dsm_in,      // modulated sample into the modulator
  output logic        dsm_bit,     // 1-bit modulator output
  output logic        dac_sw_p,    // D/A switch drives
  output logic        dac_sw_n,
  output logic [15:0] dac_iout_p,  // D/A output currents, uA
  output logic [15:0] dac_iout_n
);

  phase_t acc_phase, mod_phase;

  phase_accumulator #(.ACC_W(ACC_W), .PHASE_W(PHASE_W)) u_acc (
    .clk, .rst_n, .delta_p, .phase(acc_phase)
  );

  phase_adder #(.PHASE_W(PHASE_W)) u_padd (
    .clk, .rst_n, .phase_in(acc_phase), .phase_mod, .phase_out(mod_phase)
  );

  sine_converter #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_sine (
    .clk, .rst_n, .phase(mod_phase), .sine
  );

  am_multiplier #(.AMP_W(AMP_W)) u_am (
    .clk, .rst_n, .sine, .amp(amp_mod), .dout(dsm_in)
  );

  tunable_dsm #(.IN_W(AMP_W), .COS_W(COS_W)) u_dsm (
    .clk, .rst_n, .cos_k, .din(dsm_in), .dout(dsm_bit)
  );

  one_bit_dac u_dac (
    .clk, .vin(dsm_bit),
    .sw_p(dac_sw_p), .sw_n(dac_sw_n), .iout_p(dac_iout_p), .iout_n(dac_iout_n)
  );

endmodule
