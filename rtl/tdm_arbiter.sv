// tdm_arbiter: time-division multiplexing arbiter.
//
// A slot pointer owns one contender per cycle and advances to the next
// contender every cycle, whether or not its owner requested; only the owner
// can be granted, so a slot whose owner does not request is wasted. Two
// implementations of the pointer are selectable with IMPL:
//   TDM_COUNTER  a binary counter modulo N followed by a decoder;
//   TDM_RING     a one-hot ring counter (rotating shift register) whose bits
//                are the slot signals directly.
// Both give the same grants. Because the pointer changes every cycle there
// is nothing to gain from gating its clock, so no gated variant exists.
//
// Interface and timing as rr_arbiter: `req` levels in cycle t, registered
// one-hot `gnt` in cycle t+1. After reset slot 0 is the current slot.
// The every-cycle advance and the two pointer implementations follow the
// modelled arbiter; reset style is this design's choice.
module tdm_arbiter
  import arb_pkg::*;
#(
  parameter int unsigned N    = 12,
  parameter tdm_impl_e   IMPL = TDM_COUNTER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] slot;  // one-hot owner of the current time slot

  if (IMPL == TDM_COUNTER) begin : g_cnt
    logic [CW-1:0] cnt_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                      cnt_q <= '0;
      else if (cnt_q == CW'(N - 1))    cnt_q <= '0;
      else                             cnt_q <= cnt_q + 1'b1;
    end

    always_comb begin
      slot = '0;
      for (int i = 0; i < N; i++) slot[i] = (cnt_q == CW'(i));
    end
  end else begin : g_ring
    logic [N-1:0] ring_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ring_q <= N'(1);
      else        ring_q <= N'((ring_q << 1) | (ring_q >> (N-1)));
    end

    assign slot = ring_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gnt <= '0;
    else        gnt <= req & slot;
  end

  a_slot_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(slot));

endmodule
