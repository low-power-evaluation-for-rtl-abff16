// tb_rr_carry_workload: carry-distance workload of the round-robin arbiter,
// at the full size of 12 contenders and at the smaller sizes 2, 4, 6, 8, 10.
//
// For each maximum contender wait time (0, 5, 10..15, 20..45 cycles) the
// arbiters are reset and run for 2000 cycles under the random contender model.
// For every grant the carry distance is recorded: 1 when the priority holder
// itself is granted, k when the carry ripples past k-1 idle contenders. The
// priority holder is tracked from the grants (contender after the last
// grant). Printed per wait time: the distance histogram of the 12-contender
// arbiter, its number of arbitrations and the distance-weighted sum (a
// first-order proxy for carry-chain switching power), and the mean carry
// distance of every size. The load points and run length follow the
// evaluation this design is modelled on; the checks are this design's own:
//  * 0 cycles (full load): for every size a grant in at least 1995 of 2000
//    cycles, all at distance 1; up to 10 cycles: at least 98% of the
//    12-contender grants at distance 1;
//  * arbitrations fall and mean carry distance rises as the load falls;
//  * the weighted sum peaks at an intermediate load, not at either end;
//  * at the lowest load the mean carry distance grows with the arbiter size.
module tb_rr_carry_workload;
  localparam int unsigned N      = 12;
  localparam int unsigned CYCLES = 2000;
  localparam int NW = 14;
  localparam int unsigned WAITS [NW] = '{0, 5, 10, 11, 12, 13, 14, 15, 20, 25, 30, 35, 40, 45};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] req, gnt;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int hist [NW][N+1];
  int total [NW];
  longint weighted [NW];
  int hp = 0, cur = 0;
  bit counting = 1'b0;

  // smaller sizes, each with its own contenders
  localparam int NS = 5;
  localparam int unsigned SIZES [NS] = '{2, 4, 6, 8, 10};
  int s_arbs [NS], s_dist1 [NS];
  longint s_wt [NS];
  real mean_d [NW][NS+1];

  for (genvar k = 0; k < NS; k++) begin : g_size
    rr_carry_harness #(.N(SIZES[k])) h (
      .clk, .rst_n, .max_wait, .counting,
      .arbs (s_arbs[k]), .dist1 (s_dist1[k]), .weighted (s_wt[k])
    );
  end

  always #5 clk = ~clk;

  arb_contenders #(.N(N)) u_cont (.clk, .rst_n, .max_wait, .gnt, .req);
  rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) dut (.clk, .rst_n, .req, .gnt);

  always @(negedge clk) begin
    if (counting && rst_n && |gnt) begin
      for (int i = 0; i < int'(N); i++) begin
        if (gnt[i]) begin
          automatic int d = ((i - hp + int'(N)) % int'(N)) + 1;
          hist[cur][d]++;
          total[cur]++;
          weighted[cur] += d;
          hp = (i + 1) % N;
        end
      end
    end
  end

  initial begin
    foreach (hist[w, d]) hist[w][d] = 0;
    foreach (total[w]) begin total[w] = 0; weighted[w] = 0; end
    #1 rst_n = 1'b0;
    for (int w = 0; w < NW; w++) begin
      cur = w;
      max_wait = WAITS[w];
      @(negedge clk) rst_n = 1'b0;
      repeat (2) @(negedge clk);
      hp = 0;
      rst_n = 1'b1;
      counting = 1'b1;
      repeat (CYCLES) @(negedge clk);
      counting = 1'b0;
      begin
        automatic string line = $sformatf("wait %2dcc:", WAITS[w]);
        for (int d = 1; d <= int'(N); d++) line = {line, $sformatf(" %4d", hist[w][d])};
        $display("%s | arbitrations %4d weighted %6d", line, total[w], weighted[w]);
      end
      mean_d[w][NS] = total[w] > 0 ? real'(weighted[w]) / total[w] : 0.0;
      for (int k = 0; k < NS; k++) begin
        mean_d[w][k] = s_arbs[k] > 0 ? real'(s_wt[k]) / s_arbs[k] : 0.0;
        if (w == 0) begin
          checks++;
          if (s_arbs[k] < 1995 || s_dist1[k] != s_arbs[k]) begin
            failures++;
            $display("FAIL N=%0d full load: %0d grants, %0d at distance 1", SIZES[k], s_arbs[k], s_dist1[k]);
          end
        end
      end
    end
    // full load
    checks++;
    if (total[0] < 1995 || hist[0][1] != total[0]) begin
      failures++; $display("FAIL full load: %0d grants, %0d at distance 1", total[0], hist[0][1]);
    end
    for (int w = 1; w <= 2; w++) begin
      checks++;
      if (hist[w][1] * 100 < total[w] * 98) begin
        failures++; $display("FAIL wait %0d: only %0d of %0d at distance 1", WAITS[w], hist[w][1], total[w]);
      end
    end
    // trends
    checks++;
    if (!(total[NW-1] < total[8] && total[8] < total[0])) begin
      failures++; $display("FAIL arbitrations do not fall with load");
    end
    checks++;
    if (!(real'(weighted[NW-1]) / total[NW-1] > real'(weighted[7]) / total[7] &&
          real'(weighted[7]) / total[7] > real'(weighted[0]) / total[0])) begin
      failures++; $display("FAIL mean carry distance does not rise as load falls");
    end
    begin
      automatic int peak = 0;
      for (int w = 1; w < NW; w++) if (weighted[w] > weighted[peak]) peak = w;
      $display("weighted carry length peaks at %0dcc", WAITS[peak]);
      checks++;
      if (peak == 0 || peak == NW - 1) begin
        failures++; $display("FAIL weighted carry length peaks at an end of the load range");
      end
    end
    // mean carry distance per size
    $display("mean carry distance   N=2   N=4   N=6   N=8  N=10  N=12");
    for (int w = 0; w < NW; w++) begin
      automatic string line = $sformatf("wait %2dcc:         ", WAITS[w]);
      for (int k = 0; k <= NS; k++) line = {line, $sformatf(" %5.2f", mean_d[w][k])};
      $display("%s", line);
    end
    for (int k = 1; k <= NS; k++) begin
      checks++;
      if (!(mean_d[NW-1][k] > mean_d[NW-1][k-1])) begin
        failures++;
        $display("FAIL lowest load: mean carry distance does not grow from size %0d", k == NS ? 12 : SIZES[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NW * (CYCLES + 10) + 100));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
