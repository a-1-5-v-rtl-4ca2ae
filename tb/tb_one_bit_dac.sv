// tb_one_bit_dac: checks the behavioural 1-bit D/A model: the latch takes
// vin on the rising clock edge and holds it for the whole period (NRZ), the
// full-scale current flows into iout_p for a 1 and into iout_n for a 0, the
// two switches overlap at every transition and are never both off, and the
// total current is always the full-scale current.
module tb_one_bit_dac;
  logic clk = 1'b0, vin;
  logic sw_p, sw_n;
  logic [15:0] iout_p, iout_n;
  int checks = 0, failures = 0, overlaps = 0, both_off = 0;
  logic expect_bit;

  one_bit_dac dut (.clk, .vin, .sw_p, .sw_n, .iout_p, .iout_n);

  always #2.5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // continuous monitors
  always @(sw_p or sw_n) begin
    if (!sw_p && !sw_n) both_off++;
    if (sw_p && sw_n)   overlaps++;
  end
  always @(iout_p or iout_n) begin
    checks++;
    if (int'(iout_p) + int'(iout_n) != 11500) begin
      failures++;
      $display("FAIL total current %0d + %0d uA at %t (sw %b%b)", iout_p, iout_n, $realtime, sw_p, sw_n);
    end
  end

  initial begin
    vin = 1'b0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      #1 vin = (i % 5 == 0) ? ~vin : 1'($urandom);   // changes away from the edge
      @(posedge clk);
      expect_bit = vin;
      #1;
      // latch output must not follow vin between edges
      vin = ~vin;
      #1.5;                                            // 2.5 ns after the edge
      checks++;
      if (expect_bit ? (iout_p != 16'd11500 || iout_n != 16'd0)
                     : (iout_n != 16'd11500 || iout_p != 16'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: bit %0b gives %0d/%0d uA", i, expect_bit, iout_p, iout_n);
      end
    end
    checks++;
    if (both_off != 0) begin failures++; $display("FAIL switches both off %0d times", both_off); end
    checks++;
    if (overlaps == 0) begin failures++; $display("FAIL no make-before-break overlap seen"); end
    $display("overlaps %0d, both-off %0d", overlaps, both_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
