// allpass_section: second-order all-pass G(z) of the tunable modulator.
//
// The low-pass to band-pass transform replaces every delay of a low-pass
// delta-sigma prototype by
//     G(z) = -z^-1 (z^-1 - c) / (1 - c z^-1) = (c z^-1 - z^-2) / (1 - c z^-1),
// with c = cos(theta_o) and the notch at f_o = f_s * theta_o / (2 pi).  The
// structure uses two delays, one multiplier and two adders:
//     a(n)   = x(n) + y(n)
//     y(n+1) = c * a(n) - x(n-1)
// With c = 1 it degenerates to a single delay (the low-pass prototype).
//
// Interface: x is the W-bit input of the current cycle; y is the registered
// output, so there is no combinational path from x to y.  cos_k is c in
// signed fixed point with COS_W-1 fraction bits (c = cos_k / 32 for COS_W = 6;
// range -1 .. 31/32).  The product is truncated (arithmetic shift) and the
// new output saturates to W bits.  The structure and the 6-bit coefficient
// follow the document; the coefficient format, truncation, saturation and
// synchronous reset are this design's own choices.
module allpass_section #(
  parameter int unsigned W     = 14,
  parameter int unsigned COS_W = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [COS_W-1:0] cos_k,
  input  logic signed [W-1:0]     x,
  output logic signed [W-1:0]     y
);

  localparam logic signed [W+1:0] MAXV = (W+2)'((1 <<< (W-1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 <<< (W-1));

  logic signed [W-1:0]       x_d;     // x(n-1)
  logic signed [W:0]         a;       // x + y
  logic signed [W+COS_W:0]   prod;    // c * a, COS_W-1 fraction bits
  logic signed [W+1:0]       m, t;

  assign a    = (W+1)'(x) + (W+1)'(y);
  assign prod = a * cos_k;
  assign m    = (W+2)'(prod >>> (COS_W-1));
  assign t    = m - (W+2)'(x_d);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_d <= '0;
      y   <= '0;
    end else begin
      x_d <= x;
      if      (t > MAXV) y <= MAXV[W-1:0];
      else if (t < MINV) y <= MINV[W-1:0];
      else               y <= t[W-1:0];
    end
  end

endmodule
