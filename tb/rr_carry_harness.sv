// rr_carry_harness: one round-robin arbiter of size N under the random
// contender model, with carry-distance counters, for use by
// tb_rr_carry_workload.
//
// The priority holder is tracked from the grants (the contender after the
// last winner). For each grant the carry distance is 1 when the holder itself
// wins and k when the carry ripples past k-1 idle contenders. While
// `counting` is high the harness accumulates the number of arbitrations, the
// number at distance 1 and the distance-weighted sum; the counters clear
// while rst_n is low, so the testbench resets between load points. Grants
// are sampled at the falling clock edge, half a cycle after the arbiter's
// registered grant changes. The arbiter is the clock-gated variant. The
// carry-distance measure follows the evaluation this design is modelled on;
// deriving it from the grants rather than from the chain's internal carries
// is this testbench's own choice (the two agree, since the carry stops at
// the first requester).
module rr_carry_harness #(
  parameter int unsigned N = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned max_wait,
  input  bit          counting,
  output int          arbs,
  output int          dist1,
  output longint      weighted
);
  logic [N-1:0] req, gnt;
  int hp = 0;

  initial begin
    arbs = 0; dist1 = 0; weighted = 0;
  end

  arb_contenders #(.N(N)) u_cont (.clk, .rst_n, .max_wait, .gnt, .req);
  rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) dut (.clk, .rst_n, .req, .gnt);

  always @(negedge clk) begin
    if (!rst_n) begin
      arbs = 0; dist1 = 0; weighted = 0; hp = 0;
    end else if (counting) begin
      for (int i = 0; i < int'(N); i++) begin
        if (gnt[i]) begin
          automatic int d = ((i - hp + int'(N)) % int'(N)) + 1;
          arbs++;
          if (d == 1) dist1++;
          weighted += d;
          hp = (i + 1) % N;
        end
      end
    end
  end
endmodule
