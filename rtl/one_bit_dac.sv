// one_bit_dac: behavioural model (not synthesizable logic) of the 1-bit
// current-steering D/A converter with its latch and driver.
//
// The real part is analog: a clocked latch of cross-coupled inverters, a
// driver that lowers the swing at the switch gates and places their crossing
// point, and a differential pair that steers a tail current I_FS into one of
// two load resistors.  The output is non-return-to-zero and fully
// differential.  The crossing point is set so that the two switches are
// never off at the same time, which keeps the tail current flowing and the
// glitch energy low.
//
// The model keeps that behaviour in logic form:
//   - the latch takes vin on the rising edge of clk (NRZ: the level holds for
//     the whole clock period);
//   - the driver turns a switch on T_ON after the latch changes and the other
//     switch off T_OFF after it, with T_ON < T_OFF, so both switches conduct
//     for a short overlap and never are both off;
//   - the tail current I_FS_UA (in microamperes) flows into iout_p when only
//     sw_p is on, into iout_n when only sw_n is on, and splits in half during
//     the overlap.
// Delays are in the time unit of the instantiating scope and must satisfy
// T_ON < T_OFF < one clock period.  From the document:
// the latch, driver and differential pair, NRZ shaping, the never-both-off
// crossing point and the 11.5 mA full-scale current.  The delay values and the
// half-and-half split in the overlap are this model's own choices.
module one_bit_dac #(
  parameter int unsigned I_FS_UA = 11500,  // full-scale output current, uA
  parameter int unsigned T_ON    = 1,      // latch change to switch on
  parameter int unsigned T_OFF   = 2       // latch change to switch off
) (
  input  logic        clk,
  input  logic        vin,
  output logic        sw_p,      // gate drive of the switch feeding iout_p
  output logic        sw_n,      // gate drive of the switch feeding iout_n
  output logic [15:0] iout_p,    // current into the vout load, uA
  output logic [15:0] iout_n     // current into the complementary load, uA
);

  logic latched;

  always @(posedge clk) latched <= vin;

  // driver: rising gate edges (T_ON) are faster than falling ones (T_OFF)
  initial begin
    latched = 1'b0;
    sw_p = 1'b0;
    sw_n = 1'b1;
  end
  always @(posedge latched) begin
    #(T_ON);
    sw_p <= latched;
    #(T_OFF - T_ON);
    sw_n <= ~latched;
  end
  always @(negedge latched) begin
    #(T_ON);
    sw_n <= ~latched;
    #(T_OFF - T_ON);
    sw_p <= latched;
  end

  // differential pair: the tail current goes where the switches conduct
  always_comb begin
    case ({sw_p, sw_n})
      2'b10:   begin iout_p = 16'(I_FS_UA);     iout_n = 16'd0; end
      2'b01:   begin iout_p = 16'd0;            iout_n = 16'(I_FS_UA); end
      2'b11:   begin iout_p = 16'(I_FS_UA / 2); iout_n = 16'(I_FS_UA - I_FS_UA / 2); end
      default: begin iout_p = 16'd0;            iout_n = 16'd0; end  // both off: never expected
    endcase
  end

endmodule
