// subset_rr_harness: one tdm_subset_rr_arbiter with its contenders and a
// reference model, for use by tb_tdm_subset_rr_arbiter.
//
// The reference keeps a frame index advanced every cycle and, per frame, the
// index of the member with RR priority. In the active frame it scans the
// FRAME_SIZE positions upward (wrapping inside the frame, skipping positions
// past N in a short last frame) for the first requester, grants it and
// moves that frame's priority to the next position. The DUT grant must equal
// the prediction one cycle after the requests. Counts of checks, failures,
// grants and grants to a frame member other than the frame's first
// requester-in-index-order (evidence that RR inside the frame is exercised)
// are returned to the testbench.
module subset_rr_harness #(
  parameter int unsigned N            = 12,
  parameter int unsigned FRAME_SIZE   = 3,
  parameter bit          CLOCK_GATING = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned max_wait,
  output int          checks,
  output int          failures,
  output int          grants,
  output int          rotated
);
  localparam int unsigned F  = FRAME_SIZE;
  localparam int unsigned NF = (N + F - 1) / F;

  logic [N-1:0] req, gnt, exp_q;
  int fr = 0;
  int hpf [NF];
  int rot_q = 0;

  initial begin
    checks = 0; failures = 0; grants = 0; rotated = 0;
    foreach (hpf[i]) hpf[i] = 0;
  end

  arb_contenders #(.N(N)) u_cont (.clk, .rst_n, .max_wait, .gnt, .req);

  tdm_subset_rr_arbiter #(.N(N), .FRAME_SIZE(F), .CLOCK_GATING(CLOCK_GATING)) dut (
    .clk, .rst_n, .req, .gnt
  );

  always @(posedge clk) begin
    if (!rst_n) begin
      exp_q <= '0;
      fr    <= 0;
      rot_q <= 0;
      foreach (hpf[i]) hpf[i] <= 0;
    end else begin
      automatic logic [N-1:0] e = '0;
      automatic int first = -1;
      automatic int r = 0;
      for (int k = 0; k < F; k++) begin
        automatic int idx = fr * F + k;
        if (idx < N && req[idx] && first < 0) first = idx;
      end
      for (int k = 0; k < F; k++) begin
        automatic int pos = (hpf[fr] + k) % F;
        automatic int idx = fr * F + pos;
        if (idx < N && req[idx]) begin
          e[idx] = 1'b1;
          hpf[fr] <= (pos + 1) % F;
          r = (idx != first);
          break;
        end
      end
      exp_q <= e;
      rot_q <= r;
      fr    <= (fr + 1) % NF;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (gnt !== exp_q) begin
        failures++;
        $display("FAIL t=%0t N=%0d F=%0d gnt=%b exp=%b", $time, N, F, gnt, exp_q);
      end
      if (|gnt) grants++;
      if (|gnt && rot_q != 0) rotated++;
    end
  end
endmodule
