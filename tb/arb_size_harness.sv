// arb_size_harness: one arbiter of size N with its own contenders and a
// reference model, for use by tb_arbiter_size_sweep.
//
// KIND selects the arbiter: 0 round-robin, 1 TDM, 2 TDM+RR. CLOCK_GATING
// is passed to the RR and TDM+RR arbiters; for TDM it selects the ring
// counter instead of the binary counter. The reference works on indices,
// not on one-hot vectors, and predicts each cycle's grant from the requests:
//  * RR: scan upward from the priority index for the first requester; the
//    priority moves to the contender after the winner;
//  * TDM: the slot index advances every cycle; only its owner can win;
//  * TDM+RR: the slot owner wins if it requests; otherwise the RR scan runs
//    over the other requesters and only then does the RR priority move.
// The arbiter's grant must equal the prediction one cycle after the
// requests. The harness also measures, per grant, the latency in cycles
// from the first clock edge that sees the request (its rise, or its renewal
// in the grant cycle) to the edge that registers the grant, counting both,
// and reports the largest: 1 is an immediate grant.
// Counters clear while rst_n is low; grants are sampled at the falling edge.
// The arbitration rules the reference encodes are those of the modelled
// design; the index-based form of the reference and the latency measure are
// this testbench's own.
module arb_size_harness
  import arb_pkg::*;
#(
  parameter int unsigned N            = 4,
  parameter int unsigned KIND         = 0,
  parameter bit          CLOCK_GATING = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned max_wait,
  output int          checks,
  output int          failures,
  output int          grants,
  output int          max_lat
);
  logic [N-1:0] req, gnt, exp_q, req_d;
  int hp = 0, slot = 0, cyc = 0;
  int since [N];

  initial begin
    checks = 0; failures = 0; grants = 0; max_lat = 0;
    foreach (since[i]) since[i] = 0;
  end

  arb_contenders #(.N(N)) u_cont (.clk, .rst_n, .max_wait, .gnt, .req);

  if (KIND == 0) begin : g_rr
    rr_arbiter #(.N(N), .CLOCK_GATING(CLOCK_GATING)) dut (.clk, .rst_n, .req, .gnt);
  end else if (KIND == 1) begin : g_tdm
    tdm_arbiter #(.N(N), .IMPL(CLOCK_GATING ? TDM_RING : TDM_COUNTER)) dut (.clk, .rst_n, .req, .gnt);
  end else begin : g_tdm_rr
    logic by_rr;
    tdm_rr_arbiter #(.N(N), .CLOCK_GATING(CLOCK_GATING)) dut (
      .clk, .rst_n, .req, .gnt, .gnt_by_rr (by_rr)
    );
  end

  // reference
  always @(posedge clk) begin
    if (!rst_n) begin
      exp_q <= '0;
      hp    = 0;
      slot  = 0;
      cyc   = 0;
      req_d = '0;
      max_lat = 0;
      foreach (since[i]) since[i] = 0;
    end else begin
      automatic logic [N-1:0] e = '0;
      // latency: gnt still holds the decision of the previous edge here
      cyc++;
      for (int i = 0; i < int'(N); i++) begin
        if (gnt[i] && cyc - since[i] > max_lat) max_lat = cyc - since[i];
        if (req[i] && (!req_d[i] || gnt[i])) since[i] = cyc;
      end
      req_d = req;
      if (KIND != 0 && req[slot]) begin
        e[slot] = 1'b1;
      end else if (KIND != 1) begin
        for (int k = 0; k < int'(N); k++) begin
          automatic int idx = (hp + k) % int'(N);
          if (req[idx] && !(KIND == 2 && idx == slot)) begin
            e[idx] = 1'b1;
            hp = (idx + 1) % int'(N);
            break;
          end
        end
      end
      exp_q <= e;
      slot = (slot + 1) % int'(N);
    end
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      checks = 0; failures = 0; grants = 0;
    end else begin
      checks++;
      if (gnt !== exp_q) begin
        failures++;
        $display("FAIL t=%0t N=%0d kind=%0d gnt=%b exp=%b", $time, N, KIND, gnt, exp_q);
      end
      if (|gnt) grants++;
    end
  end
endmodule
