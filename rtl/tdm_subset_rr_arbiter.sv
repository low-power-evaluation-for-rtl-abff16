// tdm_subset_rr_arbiter: TDM over frames, round-robin inside the frame.
//
// The N contenders are split into NF = ceil(N/FRAME_SIZE) frames of
// consecutive contenders (frame f holds contenders f*FRAME_SIZE and up; the
// last frame may be short). A one-hot ring counter gives the time slot to
// one frame per cycle and advances every cycle. Inside the slot's frame the
// requesters are served round-robin: every frame keeps its own one-hot
// priority (a FRAME_SIZE-bit field of prio_q) that moves to the member after
// the winner, and only the active frame's field is scanned by a
// FRAME_SIZE-wide rr_carry_chain. FRAME_SIZE=1 reduces to plain TDM and
// FRAME_SIZE=N to plain RR. With CLOCK_GATING=1 the priority fields are
// clocked through a clock_gate cell enabled only in cycles with a grant.
//
// Interface and timing as rr_arbiter: `req` in cycle t, registered one-hot
// `gnt` in cycle t+1. After reset frame 0 owns the slot and every frame's
// priority sits on its first member.
// The frame/TDM/RR scheme follows the modelled arbiter; the per-frame
// priority, the ring counter over frames, the handling of a short last
// frame and the default FRAME_SIZE are this design's choices.
module tdm_subset_rr_arbiter #(
  parameter int unsigned N            = 12,
  parameter int unsigned FRAME_SIZE   = 3,
  parameter bit          CLOCK_GATING = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned F  = FRAME_SIZE;
  localparam int unsigned NF = (N + F - 1) / F;  // number of frames
  localparam int unsigned W  = NF * F;           // padded contender count

  logic [NF-1:0] frame_q;          // one-hot frame owning the slot
  logic [W-1:0]  prio_q;           // one-hot priority field per frame
  logic [W-1:0]  req_pad, gnt_pad, prio_d;
  logic [F-1:0]  req_f, prio_f, gnt_f, prio_f_nxt;
  logic          upd;

  assign req_pad = W'(req);

  // select the active frame's requests and priority field
  always_comb begin
    req_f  = '0;
    prio_f = '0;
    for (int f = 0; f < NF; f++) begin
      if (frame_q[f]) begin
        req_f  = req_pad[f*F +: F];
        prio_f = prio_q[f*F +: F];
      end
    end
  end

  rr_carry_chain #(.N(F)) u_chain (
    .req  (req_f),
    .prio (prio_f),
    .gnt  (gnt_f)
  );

  assign upd        = |gnt_f;
  assign prio_f_nxt = F'((gnt_f << 1) | (gnt_f >> (F-1)));

  // place the frame grant and the frame's new priority back in position
  always_comb begin
    gnt_pad = '0;
    prio_d  = prio_q;
    for (int f = 0; f < NF; f++) begin
      if (frame_q[f]) begin
        gnt_pad[f*F +: F] = gnt_f;
        prio_d[f*F +: F]  = prio_f_nxt;
      end
    end
  end

  // reset value: first member of every frame holds the priority
  function automatic logic [W-1:0] prio_reset();
    logic [W-1:0] v;
    v = '0;
    for (int f = 0; f < NF; f++) v[f*F] = 1'b1;
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= NF'(1);
      gnt     <= '0;
    end else begin
      frame_q <= NF'((frame_q << 1) | (frame_q >> (NF-1)));
      gnt     <= gnt_pad[N-1:0];
    end
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
      if (!rst_n) prio_q <= prio_reset();
      else        prio_q <= prio_d;
    end
  end else begin : g_ncg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   prio_q <= prio_reset();
      else if (upd) prio_q <= prio_d;
    end
  end

  a_gnt_onehot0:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_frame_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(frame_q));

endmodule
