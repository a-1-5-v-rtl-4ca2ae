// am_multiplier: amplitude-modulation multiplier after the sine converter.
//
// The signed 12-bit sine sample is multiplied by the unsigned 12-bit amplitude
// word A(n) (A = sqrt(I^2 + Q^2) of the quadrature data, 0 .. 4095/4096 of full
// scale) and the 24-bit product is truncated back to 12 signed bits:
// dout = floor(sine * amp / 2^AMP_W).  The output is registered (one clock of
// latency) with a synchronous active-low reset.  Treating A(n) as an unsigned
// fraction, truncating rather than rounding and the register are this
// design's own choices; the widths are the ones of the block diagram.
module am_multiplier #(
  parameter int unsigned AMP_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [AMP_W-1:0] sine,
  input  logic        [AMP_W-1:0] amp,
  output logic signed [AMP_W-1:0] dout
);

  logic signed [2*AMP_W:0] prod;   // one extra bit for the zero-extended amp

  assign prod = sine * $signed({1'b0, amp});

  always_ff @(posedge clk) begin
    if (!rst_n) dout <= '0;
    else        dout <= prod[2*AMP_W-1 -: AMP_W];   // arithmetic >> AMP_W
  end

endmodule
