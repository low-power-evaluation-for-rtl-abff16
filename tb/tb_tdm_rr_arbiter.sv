// tb_tdm_rr_arbiter: self-checking test of tdm_rr_arbiter, plain and gated.
//
// Both variants (N=12) see the same random contenders at full, high, mid and
// low load. The reference model keeps a TDM slot index (advanced every
// cycle) and an RR priority index (moved only by RR grants): the slot owner
// wins if it requests, otherwise the first requester at or after the RR
// priority. Grants and the gnt_by_rr flag are compared one cycle after the
// requests. Both arbitration steps must be seen, and the gated RR clock must
// tick exactly once per RR grant.
module tb_tdm_rr_arbiter;
  localparam int unsigned N = 12;
  localparam int unsigned PHASE = 600;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] req, gnt, gnt_cg, exp_q;
  logic by_rr, by_rr_cg, exp_rr_q;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int s = 0, hp = 0;
  int n_tdm = 0, n_rr = 0, gated_edges = 0;

  always #5 clk = ~clk;

  arb_contenders #(.N(N)) u_cont (.clk, .rst_n, .max_wait, .gnt, .req);

  tdm_rr_arbiter #(.N(N), .CLOCK_GATING(1'b0)) dut    (.clk, .rst_n, .req, .gnt, .gnt_by_rr(by_rr));
  tdm_rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) dut_cg (.clk, .rst_n, .req, .gnt(gnt_cg), .gnt_by_rr(by_rr_cg));

  always @(posedge clk) begin
    if (!rst_n) begin
      exp_q    <= '0;
      exp_rr_q <= 1'b0;
      s        <= 0;
      hp       <= 0;
    end else begin
      automatic logic [N-1:0] e = '0;
      automatic logic rr = 1'b0;
      if (req[s]) e[s] = 1'b1;
      else begin
        for (int k = 0; k < N; k++) begin
          automatic int idx = (hp + k) % N;
          if (req[idx] && idx != s) begin
            e[idx] = 1'b1;
            rr = 1'b1;
            hp <= (idx + 1) % N;
            break;
          end
        end
      end
      exp_q    <= e;
      exp_rr_q <= rr;
      s        <= (s + 1) % N;
    end
  end

  always @(posedge dut_cg.g_cg.prio_clk) if (rst_n) gated_edges++;

  always @(negedge clk) begin
    if (rst_n) begin
      checks += 4;
      if (gnt !== exp_q)     begin failures++; $display("FAIL t=%0t gnt=%b exp=%b", $time, gnt, exp_q); end
      if (gnt_cg !== exp_q)  begin failures++; $display("FAIL t=%0t gnt_cg=%b exp=%b", $time, gnt_cg, exp_q); end
      if (by_rr !== exp_rr_q)    begin failures++; $display("FAIL t=%0t by_rr", $time); end
      if (by_rr_cg !== exp_rr_q) begin failures++; $display("FAIL t=%0t by_rr_cg", $time); end
      if (|gnt &&  by_rr) n_rr++;
      if (|gnt && !by_rr) n_tdm++;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    max_wait = 0;  repeat (PHASE) @(posedge clk);
    max_wait = 5;  repeat (PHASE) @(posedge clk);
    max_wait = 25; repeat (PHASE) @(posedge clk);
    max_wait = 45; repeat (PHASE) @(posedge clk);
    checks += 3;
    if (n_tdm == 0) begin failures++; $display("FAIL no TDM-step grant"); end
    if (n_rr == 0)  begin failures++; $display("FAIL no RR-step grant"); end
    if (gated_edges > n_rr + 1 || gated_edges + 1 < n_rr) begin
      failures++;
      $display("FAIL gated RR clock edges %0d vs RR grants %0d", gated_edges, n_rr);
    end
    $display("tdm grants=%0d rr grants=%0d gated edges=%0d", n_tdm, n_rr, gated_edges);
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
