// sine_converter: phase-to-amplitude converter of the synthesizer.
//
// Only the first quadrant of the sine is computed.  The phase MSB gives the
// sign of the result and the second MSB mirrors the phase inside the quadrant
// (one's complement of the 12 lower bits).  With the half-LSB phase offset
// built into the coefficients, one's complement is an exact mirror, so the
// quadrant value is
//     mag = 2047 * sin(pi/2 * (P + 1/2) / 4096),  P = 12-bit quadrant phase.
// It is approximated by 16 parabolic segments.  The upper 4 bits u of P select
// the segment and the lower 8 bits x = P - u are the offset inside it:
//     sum = a0(u) + ((a1(u) * x) >> 7) - q(u, x[7:4]),   mag = sum >> 1
// a0 (12 bits) is the segment start in half-LSB units plus one half LSB so
// that the final truncation rounds; a1 (8 bits) is the slope; the 256 x 5-bit
// q ROM, addressed by u and the 4 upper bits of x, holds the magnitude of the
// (negative) quadratic term |a2(u)| * (16 * x[7:4] + 7.5)^2.  The sum is
// 12 bits, its 11 upper bits are the magnitude, and the MSB then selects the
// 11-bit two's complement of it, with the MSB itself prepended as the sign.
// The magnitude is never 0 (a0(0) = 2), so this equals an exact negation.
//
// The coefficients are a least-squares fit, per segment, of the target curve
// over the 256 offsets using the basis {1, x/128, (16*x[7:4]+7.5)^2},
// followed by rounding to the ROM widths and a small search that keeps the
// worst error at 1.05 LSB of the 11-bit magnitude.
//
// Follows the document: quadrant folding, 14-bit phase in and 12-bit sample
// out, 16 segments, 4-bit u, 8-bit P-u, the ROM and adder widths (12, 8, 5, 9
// and 11 bits), the half-LSB phase offset and least-squares coefficients.
// This design's own choices: the amplitude scale (2047), the half-LSB units of
// the adders, the subtraction of the quadratic term, the coefficient values,
// and a two-stage pipeline (register after the ROMs and the multiplier, and
// on the output): sine follows phase by 2 clocks.
module sine_converter #(
  parameter int unsigned PHASE_W = 14,
  parameter int unsigned AMP_W   = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      phase,
  output logic signed [AMP_W-1:0] sine
);

  localparam int unsigned QP_W = PHASE_W - 2;   // quadrant phase, 12 bits

  // a0 ROM: segment start value, half-LSB units, +1 rounding half LSB
  function automatic logic [11:0] a0_rom(input logic [3:0] u);
    case (u)
      4'd0 : a0_rom = 12'd2;
      4'd1 : a0_rom = 12'd403;
      4'd2 : a0_rom = 12'd801;
      4'd3 : a0_rom = 12'd1190;
      4'd4 : a0_rom = 12'd1568;
      4'd5 : a0_rom = 12'd1932;
      4'd6 : a0_rom = 12'd2276;
      4'd7 : a0_rom = 12'd2599;
      4'd8 : a0_rom = 12'd2896;
      4'd9 : a0_rom = 12'd3166;
      4'd10: a0_rom = 12'd3406;
      4'd11: a0_rom = 12'd3612;
      4'd12: a0_rom = 12'd3784;
      4'd13: a0_rom = 12'd3919;
      4'd14: a0_rom = 12'd4017;
      4'd15: a0_rom = 12'd4075;
      default: a0_rom = 12'd0;
    endcase
  endfunction

  // a1 ROM: segment slope, (a1 * x) >> 7 gives half-LSB units
  function automatic logic [7:0] a1_rom(input logic [3:0] u);
    case (u)
      4'd0 : a1_rom = 8'd201;
      4'd1 : a1_rom = 8'd200;
      4'd2 : a1_rom = 8'd196;
      4'd3 : a1_rom = 8'd192;
      4'd4 : a1_rom = 8'd186;
      4'd5 : a1_rom = 8'd176;
      4'd6 : a1_rom = 8'd167;
      4'd7 : a1_rom = 8'd155;
      4'd8 : a1_rom = 8'd143;
      4'd9 : a1_rom = 8'd128;
      4'd10: a1_rom = 8'd110;
      4'd11: a1_rom = 8'd94;
      4'd12: a1_rom = 8'd76;
      4'd13: a1_rom = 8'd58;
      4'd14: a1_rom = 8'd38;
      4'd15: a1_rom = 8'd20;
      default: a1_rom = 8'd0;
    endcase
  endfunction

  // a2 (P-u)^2 ROM: |a2(u)| * (16*xh + 7.5)^2 in half-LSB units, 16 x 16 x 5 bits;
  // row u holds the entries for xh = 15 (left) down to xh = 0 (right)
  function automatic logic [4:0] a2_rom(input logic [3:0] u, input logic [3:0] xh);
    logic [79:0] row;
    case (u)
      4'd0 : row = {5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0};
      4'd1 : row = {5'd2, 5'd2, 5'd2, 5'd2, 5'd1, 5'd1, 5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0};
      4'd2 : row = {5'd2, 5'd2, 5'd2, 5'd1, 5'd1, 5'd1, 5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0};
      4'd3 : row = {5'd5, 5'd5, 5'd4, 5'd3, 5'd3, 5'd2, 5'd2, 5'd2, 5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0};
      4'd4 : row = {5'd8, 5'd7, 5'd6, 5'd5, 5'd5, 5'd4, 5'd3, 5'd2, 5'd2, 5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0, 5'd0};
      4'd5 : row = {5'd7, 5'd6, 5'd5, 5'd5, 5'd4, 5'd3, 5'd3, 5'd2, 5'd2, 5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0, 5'd0};
      4'd6 : row = {5'd11, 5'd9, 5'd8, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd2, 5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd7 : row = {5'd12, 5'd10, 5'd9, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd3, 5'd2, 5'd1, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd8 : row = {5'd15, 5'd13, 5'd11, 5'd10, 5'd8, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd9 : row = {5'd16, 5'd14, 5'd12, 5'd10, 5'd9, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd10: row = {5'd13, 5'd11, 5'd10, 5'd8, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd2, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd11: row = {5'd15, 5'd13, 5'd12, 5'd10, 5'd8, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd12: row = {5'd16, 5'd14, 5'd12, 5'd10, 5'd9, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd13: row = {5'd17, 5'd15, 5'd13, 5'd11, 5'd9, 5'd8, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd14: row = {5'd16, 5'd14, 5'd12, 5'd10, 5'd9, 5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1, 5'd1, 5'd0, 5'd0, 5'd0};
      4'd15: row = {5'd19, 5'd17, 5'd14, 5'd12, 5'd10, 5'd9, 5'd7, 5'd6, 5'd4, 5'd3, 5'd2, 5'd2, 5'd1, 5'd0, 5'd0, 5'd0};
      default: row = '0;
    endcase
    return row[xh*5 +: 5];
  endfunction

  // ---- quadrant folding -------------------------------------------------
  logic             sign_bit, mirror;
  logic [QP_W-1:0]  qphase;
  logic [3:0]       u;
  logic [7:0]       x;

  assign sign_bit = phase[PHASE_W-1];
  assign mirror   = phase[PHASE_W-2];
  assign qphase   = mirror ? ~phase[QP_W-1:0] : phase[QP_W-1:0];  // 1's complement
  assign u        = qphase[QP_W-1 -: 4];
  assign x        = qphase[7:0];

  // ---- stage 1: ROMs and the slope multiplier ----------------------------
  logic [15:0] slope_prod;
  assign slope_prod = a1_rom(u) * x;

  logic        sign_q;
  logic [11:0] a0_q;
  logic [8:0]  slope_q;
  logic [4:0]  quad_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sign_q  <= 1'b0;
      a0_q    <= '0;
      slope_q <= '0;
      quad_q  <= '0;
    end else begin
      sign_q  <= sign_bit;
      a0_q    <= a0_rom(u);
      slope_q <= slope_prod[15:7];
      quad_q  <= a2_rom(u, x[7:4]);
    end
  end

  // ---- stage 2: adders and sign ------------------------------------------
  logic [8:0]  lin;
  logic [11:0] sum;
  logic [10:0] mag, mag_c;

  assign lin   = slope_q - 9'(quad_q);          // never negative for these ROMs
  assign sum   = a0_q + 12'(lin);               // never above 4095
  assign mag   = sum[11:1];
  assign mag_c = sign_q ? (~mag + 11'd1) : mag; // 11-bit two's complement

  always_ff @(posedge clk) begin
    if (!rst_n) sine <= '0;
    else        sine <= {sign_q, mag_c};
  end

endmodule
