// phase_accumulator: the frequency-setting part of the synthesizer.
//
// An ACC_W-bit register adds the phase increment word delta_p every clock and
// overflows modulo 2^ACC_W; the overflow rate is the output frequency
// f_out = delta_p * f_s / 2^ACC_W.  Changing delta_p from cycle to cycle is the
// frequency-modulation input.  The phase output is the PHASE_W most
// significant bits of the register (plain truncation, no dither).
//
// Interface: delta_p is sampled on every rising clk edge; phase is the
// registered accumulator value, so the increment applied at edge n is visible
// after that edge.  rst_n is an active-low synchronous reset that clears the
// accumulator (the reset behaviour is this design's choice).
module phase_accumulator #(
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned PHASE_W = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ACC_W-1:0]   delta_p,
  output logic [PHASE_W-1:0] phase
);

  logic [ACC_W-1:0] acc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) acc_q <= '0;
    else        acc_q <= acc_q + delta_p;   // wraps modulo 2^ACC_W
  end

  assign phase = acc_q[ACC_W-1 -: PHASE_W];

endmodule
