// tb_clock_gating_activity: how often the gated priority registers of the
// 12-contender RR and TDM+RR arbiters are actually clocked, at full, high,
// mid and low load (maximum contender wait 0, 5, 25 and 45 cycles, 1000
// cycles each).
//
// Each clock-gated arbiter has its own contenders. The testbench counts the
// rising edges of each arbiter's gated clock (reached hierarchically) and the
// cycles of each load point, and prints the fraction of cycles in which the
// register was clocked: the share of the free-running clock's power that the
// gate cannot save. The evaluation this design is modelled on explains its
// clock-gating results by this mechanism: the RR priority only changes on a
// grant, and in TDM+RR at high load almost all grants come from the TDM step,
// which leaves the RR state alone. The checks, with this design's own bounds:
//  * RR at full load: clocked in at least 99% of cycles (a grant every cycle);
//  * RR at low load: clocked in fewer than 75% of cycles;
//  * TDM+RR at full load: clocked in at most 1% of cycles;
//  * TDM+RR at mid load: clocked in more cycles than at full load, as the
//    RR step takes over the slots of idle owners.
module tb_clock_gating_activity;
  localparam int unsigned N = 12;
  localparam int unsigned PHASE = 1000;
  localparam int NL = 4;
  localparam int unsigned WAITS [NL] = '{0, 5, 25, 45};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] req_rr, gnt_rr, req_tr, gnt_tr;
  logic by_rr;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int e_rr = 0, e_tr = 0;
  real fr_rr [NL], fr_tr [NL];

  always #5 clk = ~clk;

  arb_contenders #(.N(N)) u_cont_rr (.clk, .rst_n, .max_wait, .gnt (gnt_rr), .req (req_rr));
  arb_contenders #(.N(N)) u_cont_tr (.clk, .rst_n, .max_wait, .gnt (gnt_tr), .req (req_tr));

  rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) u_rr (
    .clk, .rst_n, .req (req_rr), .gnt (gnt_rr)
  );
  tdm_rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) u_tr (
    .clk, .rst_n, .req (req_tr), .gnt (gnt_tr), .gnt_by_rr (by_rr)
  );

  always @(posedge u_rr.g_cg.prio_clk) if (rst_n) e_rr++;
  always @(posedge u_tr.g_cg.prio_clk) if (rst_n) e_tr++;

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int l = 0; l < NL; l++) begin
      automatic int r0, t0;
      max_wait = WAITS[l];
      // let the previous load's requests drain into the new pattern
      repeat (50) @(negedge clk);
      r0 = e_rr;
      t0 = e_tr;
      repeat (PHASE) @(negedge clk);
      fr_rr[l] = real'(e_rr - r0) / PHASE;
      fr_tr[l] = real'(e_tr - t0) / PHASE;
      $display("wait %2dcc: gated clock runs in %5.1f%% of cycles (RR), %5.1f%% (TDM+RR)",
               WAITS[l], 100.0 * fr_rr[l], 100.0 * fr_tr[l]);
    end
    checks++;
    if (fr_rr[0] < 0.99) begin failures++; $display("FAIL RR full load clocked only %f", fr_rr[0]); end
    checks++;
    if (fr_rr[NL-1] >= 0.75) begin failures++; $display("FAIL RR low load clocked %f", fr_rr[NL-1]); end
    checks++;
    if (fr_tr[0] > 0.01) begin failures++; $display("FAIL TDM+RR full load clocked %f", fr_tr[0]); end
    checks++;
    if (!(fr_tr[2] > fr_tr[0])) begin failures++; $display("FAIL TDM+RR mid load not above full load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NL * (PHASE + 60) + 200));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
