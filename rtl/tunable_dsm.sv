// tunable_dsm: tunable sixth-order band-pass 1-bit delta-sigma modulator.
//
// The loop is a third-order low-pass prototype (cascade of integrators with
// distributed 1-bit feedback, noise-transfer function with maximum
// out-of-band gain 1.52, zeros optimised for an oversampling ratio of 64) in
// which every delay is replaced by the all-pass G(z) of allpass_section.  The
// substitution doubles the order and moves the noise notch from dc to
// f_o = f_s * acos(c) / (2 pi), c = cos_k / 32, so the notch can be placed on
// the synthesizer's output frequency anywhere between dc and f_s/2.
//
// Each stage k (word length W1 = 14, W2 = 12, W3 = 10 bits) computes
//     w_k = sat(in_k + fb_k + y_k),   y_k <= G(w_k)
// where y_k is the all-pass output (fed back locally and passed on) and
// fb_k = -D_k when the output bit is 1 and +D_k when it is 0, with
// D = 1843, 533, 102.  The stage inputs are
//     in_1 = din * 2^-2,  in_2 = y_1 * 2^-2 - y_3 * 2^-7,  in_3 = y_2 * 2^-2,
// where each word is read as a fraction of its own full scale, so that moving
// between words of different lengths is an arithmetic shift (y_1 >>> 4,
// y_3 >>> 5, y_2 >>> 4; din is sign-extended).  The quantizer is the sign of
// y_3: dout = 1 when y_3 >= 0.
//
// Interface: din is a signed 12-bit sample taken every clock; dout is the
// 1-bit output of the same cycle, taken directly from the y_3 register (no
// logic from din to dout).  cos_k is the signed 6-bit tuning word.  Inputs
// up to about half of the 12-bit full scale keep the loop stable.
//
// From the document: topology, word lengths, feedback levels, the 2^-2 and
// 2^-7 scalings, the 6-bit cos(theta_o) and the comparator.  This design's
// own choices: reading each word as a fraction of its full scale, the
// coefficient format, truncating shifts, saturating adders and the reset.
module tunable_dsm #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned W1    = 14,
  parameter int unsigned W2    = 12,
  parameter int unsigned W3    = 10,
  parameter int          D1    = 1843,
  parameter int          D2    = 533,
  parameter int          D3    = 102,
  parameter int unsigned IN_SHIFT    = 2,  // 2^-2 on the input
  parameter int unsigned STAGE_SHIFT = 2,  // 2^-2 between stages
  parameter int unsigned RES_SHIFT   = 7,  // 2^-7 resonator feedback
  parameter int unsigned COS_W = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [COS_W-1:0] cos_k,
  input  logic signed [IN_W-1:0]  din,
  output logic                    dout
);

  // shifts that realise the scalings between words of different lengths
  localparam int IN_LSH  = int'(W1) - int'(IN_W) - int'(IN_SHIFT);  // 0: plain sign extension
  localparam int S12_RSH = int'(W1) - int'(W2) + int'(STAGE_SHIFT); // 4
  localparam int S23_RSH = int'(W2) - int'(W3) + int'(STAGE_SHIFT); // 4
  localparam int R32_RSH = int'(W3) - int'(W2) + int'(RES_SHIFT);   // 5

  logic signed [W1-1:0] y1, w1;
  logic signed [W2-1:0] y2, w2;
  logic signed [W3-1:0] y3, w3;

  // saturating sums, evaluated in 32-bit signed arithmetic
  function automatic int sat(input int v, input int unsigned w);
    int hi, lo;
    hi = (1 <<< (w - 1)) - 1;
    lo = -(1 <<< (w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

  int in1, in2, in3, fb1, fb2, fb3;

  assign dout = ~y3[W3-1];           // comparator: 1 when y3 >= 0

  always_comb begin
    fb1 = dout ? -D1 : D1;
    fb2 = dout ? -D2 : D2;
    fb3 = dout ? -D3 : D3;
    in1 = (IN_LSH >= 0) ? (int'(din) <<< IN_LSH) : (int'(din) >>> (-IN_LSH));
    in2 = (int'(y1) >>> S12_RSH) - (int'(y3) >>> R32_RSH);
    in3 = int'(y2) >>> S23_RSH;
    w1  = W1'(sat(in1 + fb1 + int'(y1), W1));
    w2  = W2'(sat(in2 + fb2 + int'(y2), W2));
    w3  = W3'(sat(in3 + fb3 + int'(y3), W3));
  end

  allpass_section #(.W(W1), .COS_W(COS_W)) u_g1 (.clk, .rst_n, .cos_k, .x(w1), .y(y1));
  allpass_section #(.W(W2), .COS_W(COS_W)) u_g2 (.clk, .rst_n, .cos_k, .x(w2), .y(y2));
  allpass_section #(.W(W3), .COS_W(COS_W)) u_g3 (.clk, .rst_n, .cos_k, .x(w3), .y(y3));

endmodule
