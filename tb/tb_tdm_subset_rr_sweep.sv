// tb_tdm_subset_rr_sweep: TDM+subset(RR) arbiters of 6, 8, 10 and 12
// contenders with every frame size from 1 (plain TDM) to N (plain RR), run
// side by side through full, high, mid and low load (maximum contender wait
// 0, 5, 25 and 45 cycles, 600 cycles each).
//
// These are the sizes and frame sizes over which the evaluation this design
// is modelled on compares the scheme. Power is outside what RTL simulation
// measures, so the sweep reports what RTL does show: the number of grants per
// load point for each size and frame size. Every arbiter is checked cycle by
// cycle against the reference model in subset_rr_harness. On top of that the
// testbench checks, as this design's own expectations, that:
//  * at full load every arbiter grants in every cycle after reset, whatever
//    its frame size;
//  * at mid load plain RR (frame size N) grants more than plain TDM (frame
//    size 1), since TDM wastes the slots of idle contenders.
module tb_tdm_subset_rr_sweep;
  localparam int unsigned PHASE = 600;
  localparam int NS = 4;
  localparam int unsigned SIZES [NS] = '{6, 8, 10, 12};
  localparam int NL = 4;
  localparam int unsigned WAITS [NL] = '{0, 5, 25, 45};
  localparam int FMAX = 12;

  logic clk = 1'b0, rst_n = 1'b1;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int c [NS][FMAX+1], f [NS][FMAX+1], g [NS][FMAX+1], r [NS][FMAX+1];
  int gp [NL][NS][FMAX+1];

  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_size
    for (genvar fs = 1; fs <= int'(SIZES[s]); fs++) begin : g_frame
      subset_rr_harness #(.N(SIZES[s]), .FRAME_SIZE(fs), .CLOCK_GATING(fs % 2 == 0)) h (
        .clk, .rst_n, .max_wait,
        .checks (c[s][fs]), .failures (f[s][fs]), .grants (g[s][fs]), .rotated (r[s][fs])
      );
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int l = 0; l < NL; l++) begin
      automatic int g0 [NS][FMAX+1];
      max_wait = WAITS[l];
      @(negedge clk);
      g0 = g;
      repeat (PHASE) @(negedge clk);
      for (int s = 0; s < NS; s++)
        for (int fs = 1; fs <= int'(SIZES[s]); fs++) gp[l][s][fs] = g[s][fs] - g0[s][fs];
    end

    for (int s = 0; s < NS; s++) begin
      $display("N=%0d grants per %0d cycles at waits 0/5/25/45:", SIZES[s], PHASE);
      for (int fs = 1; fs <= int'(SIZES[s]); fs++) begin
        checks   += c[s][fs];
        failures += f[s][fs];
        $display("  frame size %2d: %4d %4d %4d %4d", fs,
                 gp[0][s][fs], gp[1][s][fs], gp[2][s][fs], gp[3][s][fs]);
        checks++;
        if (gp[0][s][fs] < int'(PHASE) - 2) begin
          failures++;
          $display("FAIL N=%0d F=%0d full load granted only %0d of %0d cycles",
                   SIZES[s], fs, gp[0][s][fs], PHASE);
        end
      end
      checks++;
      if (gp[2][s][SIZES[s]] <= gp[2][s][1]) begin
        failures++;
        $display("FAIL N=%0d mid load: RR %0d grants not above TDM %0d",
                 SIZES[s], gp[2][s][SIZES[s]], gp[2][s][1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NL * (PHASE + 1) + 200));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
