// tb_clock_gate: self-checking test of the clock_gate cell.
//
// A random enable pattern is applied just after each rising clock edge and
// sometimes also toggled during the high phase. The expected gated clock is
// worked out per cycle: a pulse appears exactly when the enable (or test
// enable) was high at the preceding falling edge, and the pulse is never
// shortened, i.e. gclk is high at the middle and end of the high phase of an
// enabled cycle and low throughout a disabled one.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, test_en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, skipped = 0;
  logic en_at_low;

  clock_gate dut (.clk, .en, .test_en, .gclk);

  initial begin
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: 10 time units, enable changes early in it
      clk = 1'b0;
      #2;
      en      = ($urandom_range(2, 0) != 0);
      test_en = ($urandom_range(9, 0) == 0);
      #7;
      en_at_low = en | test_en;
      #1;
      clk = 1'b1;   // rising edge
      #3;
      checks++;
      if (gclk !== en_at_low) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%b expected %b", cyc, gclk, en_at_low);
      end
      // disturb the enable during the high phase: must not matter
      en      = ~en;
      test_en = 1'b0;
      #6;
      checks++;
      if (gclk !== en_at_low) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%b changed during high phase", cyc, gclk);
      end
      if (en_at_low) pulses++; else skipped++;
      #1;
    end
    clk = 1'b0;
    #1;
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
    checks++;
    if (pulses == 0 || skipped == 0) begin failures++; $display("FAIL enable pattern not exercised"); end
    $display("pulses=%0d skipped=%0d", pulses, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
