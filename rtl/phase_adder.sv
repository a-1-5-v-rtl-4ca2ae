// phase_adder: phase-modulation adder between the accumulator and the
// phase-to-amplitude converter.
//
// It adds the phase-modulation word P(n) to the accumulator phase modulo
// 2^PHASE_W (one full turn), which is how the quadrature modulator applies the
// arctangent phase of the I/Q data.  The sum is registered: phase_out follows
// the inputs by one clock.  The output register and its synchronous reset are
// this design's choice.
module phase_adder #(
  parameter int unsigned PHASE_W = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase_in,
  input  logic [PHASE_W-1:0] phase_mod,
  output logic [PHASE_W-1:0] phase_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase_out <= '0;
    else        phase_out <= phase_in + phase_mod;  // modulo one turn
  end

endmodule
