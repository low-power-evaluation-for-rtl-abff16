// tb_rr_arbiter: self-checking test of rr_arbiter, plain and clock-gated.
//
// Both variants (N=12) see the same random contenders, run through full,
// high, mid and low load (maximum wait 0, 5, 25, 45 cycles). An index-based
// round-robin reference model, written independently of the carry chain,
// predicts every grant; both DUTs must match it cycle by cycle, one cycle
// after the requests. It also checks: no request waits longer than N cycles,
// at full load a grant is issued every cycle, and the gated priority clock
// is really stopped in cycles without a grant.
module tb_rr_arbiter;
  localparam int unsigned N = 12;
  localparam int unsigned PHASE = 600;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] req, gnt, gnt_cg, exp_q;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int hp = 0;
  int unsigned wait_cnt [N];
  int full_load_idle = 0, gated_edges = 0, grants = 0;

  always #5 clk = ~clk;

  arb_contenders #(.N(N)) u_cont (.clk, .rst_n, .max_wait, .gnt, .req);

  rr_arbiter #(.N(N), .CLOCK_GATING(1'b0)) dut    (.clk, .rst_n, .req, .gnt);
  rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) dut_cg (.clk, .rst_n, .req, .gnt(gnt_cg));

  // reference: scan upward from the highest-priority index hp
  always @(posedge clk) begin
    if (!rst_n) begin
      exp_q <= '0;
      hp    <= 0;
    end else begin
      automatic logic [N-1:0] e = '0;
      for (int k = 0; k < N; k++) begin
        automatic int idx = (hp + k) % N;
        if (req[idx]) begin
          e[idx] = 1'b1;
          hp <= (idx + 1) % N;
          break;
        end
      end
      exp_q <= e;
    end
  end

  // gated priority clock activity
  always @(posedge dut_cg.g_cg.prio_clk) if (rst_n) gated_edges++;

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (gnt !== exp_q) begin
        failures++;
        $display("FAIL t=%0t gnt=%b exp=%b", $time, gnt, exp_q);
      end
      checks++;
      if (gnt_cg !== exp_q) begin
        failures++;
        $display("FAIL t=%0t gnt_cg=%b exp=%b", $time, gnt_cg, exp_q);
      end
      if (|gnt) grants++;
      if (max_wait == 0 && gnt == '0) full_load_idle++;
      for (int i = 0; i < N; i++) begin
        if (req[i] && !gnt[i]) wait_cnt[i]++;
        else wait_cnt[i] = 0;
        if (wait_cnt[i] > N) begin
          failures++;
          $display("FAIL contender %0d waited %0d cycles", i, wait_cnt[i]);
          wait_cnt[i] = 0;
        end
      end
    end
  end

  initial begin
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    #1 rst_n = 1'b0;   // asynchronous reset edge
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4) @(posedge clk);   // first grants appear after reset
    max_wait = 0;  repeat (PHASE) @(posedge clk);
    max_wait = 5;  repeat (PHASE) @(posedge clk);
    max_wait = 25; repeat (PHASE) @(posedge clk);
    max_wait = 45; repeat (PHASE) @(posedge clk);
    checks++;
    if (full_load_idle > 1) begin
      failures++;
      $display("FAIL full load left %0d cycles without grant", full_load_idle);
    end
    checks++;
    if (gated_edges >= grants + 2 || gated_edges + 2 < grants) begin
      failures++;
      $display("FAIL gated clock edges %0d vs grants %0d", gated_edges, grants);
    end
    checks++;
    if (gated_edges > 4*PHASE - PHASE/4) begin
      failures++;
      $display("FAIL gated clock never stopped (%0d edges)", gated_edges);
    end
    $display("grants=%0d gated_edges=%0d", grants, gated_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (4*PHASE + 200));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
