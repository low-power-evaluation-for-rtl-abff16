// tdm_rr_arbiter: two-step arbiter, TDM first and round-robin second.
//
// Step 1 is TDM: a one-hot ring counter names the slot owner each cycle and
// advances every cycle; if the owner requests, it is granted. Step 2 runs
// only when the owner does not request: the slot, which plain TDM would
// waste, goes by round-robin to the other requesters, using a one-hot RR
// priority register and the replicated carry chain of rr_arbiter. The RR
// priority register moves (to the contender after the RR winner) only on
// grants made by step 2, so at high load, when step 1 serves nearly every
// cycle, it hardly changes. With CLOCK_GATING=1 it is clocked through a
// clock_gate cell enabled only by RR grants.
//
// Interface and timing as rr_arbiter: `req` in cycle t, registered one-hot
// `gnt` in cycle t+1; `gnt_by_rr` marks a grant made by step 2. After reset
// the slot and the RR priority are both at contender 0.
// The two-step scheme and the ring-counter TDM follow the modelled arbiter;
// updating the RR priority only on RR grants is this design's reading of it.
module tdm_rr_arbiter #(
  parameter int unsigned N            = 12,
  parameter bit          CLOCK_GATING = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic         gnt_by_rr
);

  logic [N-1:0] ring_q;   // one-hot TDM slot owner
  logic [N-1:0] prio_q;   // one-hot RR priority
  logic [N-1:0] tdm_gnt, rr_gnt, gnt_d, prio_nxt;
  logic         tdm_hit, rr_upd;

  assign tdm_gnt = req & ring_q;
  assign tdm_hit = |tdm_gnt;

  rr_carry_chain #(.N(N)) u_chain (
    .req  (req & ~ring_q),
    .prio (prio_q),
    .gnt  (rr_gnt)
  );

  assign gnt_d    = tdm_hit ? tdm_gnt : rr_gnt;
  assign rr_upd   = ~tdm_hit & (|rr_gnt);
  assign prio_nxt = N'((rr_gnt << 1) | (rr_gnt >> (N-1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring_q    <= N'(1);
      gnt       <= '0;
      gnt_by_rr <= 1'b0;
    end else begin
      ring_q    <= N'((ring_q << 1) | (ring_q >> (N-1)));
      gnt       <= gnt_d;
      gnt_by_rr <= rr_upd;
    end
  end

  if (CLOCK_GATING) begin : g_cg
    logic prio_clk;

    clock_gate u_cg (
      .clk     (clk),
      .en      (rr_upd),
      .test_en (1'b0),
      .gclk    (prio_clk)
    );

    always_ff @(posedge prio_clk or negedge rst_n) begin
      if (!rst_n) prio_q <= N'(1);
      else        prio_q <= prio_nxt;
    end
  end else begin : g_ncg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      prio_q <= N'(1);
      else if (rr_upd) prio_q <= prio_nxt;
    end
  end

  a_gnt_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_prio_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(prio_q));

endmodule
