// rr_arbiter: round-robin arbiter with a one-hot priority state.
//
// The contender that was granted last gets the lowest priority next: after a
// grant to contender j the one-hot priority register moves to j+1 (mod N).
// Each cycle the replicated carry chain (rr_carry_chain) scans upward from the
// priority holder to the first requesting contender. When nobody requests no
// grant is made and the priority register keeps its value; that is exactly
// the condition under which its clock may be switched off. With
// CLOCK_GATING=1 the priority register is clocked through a clock_gate cell
// enabled only in cycles that produce a grant; with CLOCK_GATING=0 it is a
// plain enabled register on the free-running clock. Both behave identically.
//
// Interface: `req` is a level per contender, held until served. Timing: the
// requests of cycle t are arbitrated in cycle t and the one-hot grant is
// registered, so `gnt` is high during cycle t+1. A contender that sees its
// grant may keep (or re-raise) `req` in that same cycle for a new request.
// After reset contender 0 has the highest priority and no grant is issued.
// The one-hot state, carry-chain structure and grant timing follow the
// modelled arbiter; the asynchronous active-low reset is this design's choice.
module rr_arbiter #(
  parameter int unsigned N            = 12,
  parameter bit          CLOCK_GATING = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  logic [N-1:0] prio_q;    // one-hot: highest-priority contender
  logic [N-1:0] gnt_d;     // grant decided this cycle
  logic [N-1:0] prio_nxt;  // contender after the one granted
  logic         upd;

  rr_carry_chain #(.N(N)) u_chain (
    .req  (req),
    .prio (prio_q),
    .gnt  (gnt_d)
  );

  assign upd      = |gnt_d;
  assign prio_nxt = N'((gnt_d << 1) | (gnt_d >> (N-1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gnt <= '0;
    else        gnt <= gnt_d;
  end

  if (CLOCK_GATING) begin : g_cg
    logic prio_clk;

    clock_gate u_cg (
      .clk     (clk),
      .en      (upd),
      .test_en (1'b0),
      .gclk    (prio_clk)
    );

    always_ff @(posedge prio_clk or negedge rst_n) begin
      if (!rst_n) prio_q <= N'(1);
      else        prio_q <= prio_nxt;
    end
  end else begin : g_ncg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   prio_q <= N'(1);
      else if (upd) prio_q <= prio_nxt;
    end
  end

  // the priority state stays one-hot, and at most one contender is granted
  a_prio_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(prio_q));
  a_gnt_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_gnt_req:     assert property (@(posedge clk) disable iff (!rst_n) (gnt_d & ~req) == '0);

endmodule
