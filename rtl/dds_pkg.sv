// dds_pkg: word widths and constants shared by the direct digital synthesizer.
//
// The widths follow the block diagram of the synthesizer: a 32-bit phase
// accumulator whose 14 most significant bits form the phase word, a 12-bit
// two's-complement sine/amplitude path, a 6-bit cos(theta_o) tuning word for
// the band-pass delta-sigma modulator, and three modulator stages of 14, 12
// and 10 bits with 1-bit feedback levels of 1843, 533 and 102.  The
// representation of the tuning word (signed, 5 fraction bits) is this
// design's own choice.
package dds_pkg;

  localparam int unsigned ACC_W   = 32;  // phase accumulator length j
  localparam int unsigned PHASE_W = 14;  // phase word after truncation
  localparam int unsigned AMP_W   = 12;  // sine / amplitude word
  localparam int unsigned COS_W   = 6;   // cos(theta_o) tuning word

  typedef logic [ACC_W-1:0]          freq_word_t;   // phase increment dP
  typedef logic [PHASE_W-1:0]        phase_t;       // phase, 2^14 = one turn
  typedef logic signed [AMP_W-1:0]   sample_t;      // signed 12-bit sample
  typedef logic [AMP_W-1:0]          amp_t;         // unsigned amplitude A(n)
  typedef logic signed [COS_W-1:0]   cos_t;         // cos(theta_o) * 2^5

endpackage
