// tb_mpsoc_system: the producer/consumer system at the four evaluated
// time-out periods (1024, 2048, 3096 and 4092 cycles), side by side.
//
// Each mpsoc_harness moves 256 samples from the producer's to the consumer's
// data memory through the FIFO and checks data, FIFO occupancy, poll timing
// and clock gating (see mpsoc_harness). Across the four runs the testbench
// also checks that a longer period means fewer polls per cycle, the effect
// behind the lower power of lower duty cycles, and that the FIFO was seen
// half full and full in every run.
module tb_mpsoc_system;
  localparam int NP = 4;
  localparam int unsigned PERIODS [NP] = '{1024, 2048, 3096, 4092};

  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  int c [NP], f [NP], cy [NP], po [NP], fe [NP], de [NP], nf [NP], nh [NP];
  bit d [NP];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NP; i++) begin : g_run
    mpsoc_harness #(.PERIOD(PERIODS[i]), .ITEMS(256)) h (
      .clk, .rst_n, .checks(c[i]), .failures(f[i]), .cycles(cy[i]), .polls(po[i]),
      .fifo_clk_edges(fe[i]), .dmem_clk_edges(de[i]), .n_full(nf[i]), .n_half(nh[i]), .done(d[i])
    );
  end

  initial begin
    #1 rst_n = 1'b0;
    #30 rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int i = 0; i < NP; i++) begin
      checks   += c[i];
      failures += f[i];
      checks++;
      if (nh[i] == 0) begin failures++; $display("FAIL P=%0d never half full", PERIODS[i]); end
      checks++;
      if (nf[i] == 0) begin failures++; $display("FAIL P=%0d never full", PERIODS[i]); end
      if (i > 0) begin
        checks++;
        // polls per cycle must fall as the period grows
        if (real'(po[i]) / real'(cy[i]) >= real'(po[i-1]) / real'(cy[i-1])) begin
          failures++;
          $display("FAIL poll rate does not fall from P=%0d to P=%0d", PERIODS[i-1], PERIODS[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 400000);
    // report what the runs had counted when the simulation hung
    for (int i = 0; i < NP; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
