// tb_arbiter_size_sweep: the round-robin, TDM and TDM+RR arbiters at every
// evaluated size (2, 4, 6, 8, 10 and 12 contenders), each in both forms:
// RR and TDM+RR without and with clock gating, TDM with the binary counter
// and with the ring counter. All 36 arbiters run side by side through full,
// high, mid and low load (maximum contender wait 0, 5, 25 and 45 cycles,
// 500 cycles each) with their own contenders.
//
// Each arbiter is compared cycle by cycle with the index-based reference in
// arb_size_harness. The testbench further checks:
//  * at full load every arbiter grants in every cycle after reset;
//  * the worst-case latency, from the first clock edge that sees a request
//    to the edge that registers its grant, is exactly N cycles: a contender
//    waits for at most the N-1 others (RR) or for its next slot (TDM), and at
//    full load that bound is reached;
//  * at mid load the two RR arbiters together grant more than the two TDM
//    arbiters of the same size (N >= 6), because TDM wastes the slots of idle
//    contenders. At low load the two converge, since each idle contender
//    then only adds its own wait, so no check is made there.
// The sizes and load points follow the evaluation this design is modelled
// on; the latency and throughput checks are this design's own.
module tb_arbiter_size_sweep;
  localparam int unsigned PHASE = 500;
  localparam int NS = 6;
  localparam int unsigned SIZES [NS] = '{2, 4, 6, 8, 10, 12};
  localparam int NL = 4;
  localparam int unsigned WAITS [NL] = '{0, 5, 25, 45};
  localparam int NA = 6;   // kind * 2 + form
  localparam string NAMES [NA] = '{"RR", "RR-CG", "TDM-cnt", "TDM-ring", "TDM+RR", "TDM+RR-CG"};

  logic clk = 1'b0, rst_n = 1'b1;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int c [NS][NA], f [NS][NA], g [NS][NA], ml [NS][NA];
  int gp [NL][NS][NA];

  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_size
    for (genvar a = 0; a < NA; a++) begin : g_arb
      arb_size_harness #(.N(SIZES[s]), .KIND(a / 2), .CLOCK_GATING(a % 2 == 1)) h (
        .clk, .rst_n, .max_wait,
        .checks (c[s][a]), .failures (f[s][a]), .grants (g[s][a]), .max_lat (ml[s][a])
      );
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int l = 0; l < NL; l++) begin
      automatic int g0 [NS][NA];
      max_wait = WAITS[l];
      @(negedge clk);
      g0 = g;
      repeat (PHASE) @(negedge clk);
      for (int s = 0; s < NS; s++)
        for (int a = 0; a < NA; a++) gp[l][s][a] = g[s][a] - g0[s][a];
    end

    for (int s = 0; s < NS; s++) begin
      $display("N=%0d grants per %0d cycles at waits 0/5/25/45, worst latency:", SIZES[s], PHASE);
      for (int a = 0; a < NA; a++) begin
        checks   += c[s][a];
        failures += f[s][a];
        $display("  %-10s %4d %4d %4d %4d  lat %0d", NAMES[a],
                 gp[0][s][a], gp[1][s][a], gp[2][s][a], gp[3][s][a], ml[s][a]);
        checks++;
        if (gp[0][s][a] < int'(PHASE) - 2) begin
          failures++;
          $display("FAIL N=%0d %s full load granted only %0d of %0d cycles",
                   SIZES[s], NAMES[a], gp[0][s][a], PHASE);
        end
        checks++;
        if (ml[s][a] != int'(SIZES[s])) begin
          failures++;
          $display("FAIL N=%0d %s worst latency %0d, expected %0d", SIZES[s], NAMES[a], ml[s][a], SIZES[s]);
        end
      end
      if (SIZES[s] >= 6) begin
        automatic int rr  = gp[2][s][0] + gp[2][s][1];
        automatic int tdm = gp[2][s][2] + gp[2][s][3];
        checks++;
        if (rr <= tdm) begin
          failures++;
          $display("FAIL N=%0d mid load: RR %0d grants not above TDM %0d", SIZES[s], rr, tdm);
        end
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
