// tb_tdm_subset_rr_arbiter: self-checking test of tdm_subset_rr_arbiter.
//
// Four configurations run side by side through full, high, mid and low load:
// N=12 with frames of 3 (the default), N=10 with frames of 4 (a short last
// frame, clock-gated), and the two limits N=6 with frames of 1 (plain TDM)
// and frames of 6 (plain RR). Each is checked cycle by cycle against a
// reference model in subset_rr_harness. Round-robin inside a frame must be
// seen to pick a member other than the lowest-indexed requester.
module tb_tdm_subset_rr_arbiter;
  localparam int unsigned PHASE = 600;

  logic clk = 1'b0, rst_n = 1'b1;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int c [4], f [4], g [4], r [4];

  always #5 clk = ~clk;

  subset_rr_harness #(.N(12), .FRAME_SIZE(3), .CLOCK_GATING(1'b0)) h0 (
    .clk, .rst_n, .max_wait, .checks(c[0]), .failures(f[0]), .grants(g[0]), .rotated(r[0]));
  subset_rr_harness #(.N(10), .FRAME_SIZE(4), .CLOCK_GATING(1'b1)) h1 (
    .clk, .rst_n, .max_wait, .checks(c[1]), .failures(f[1]), .grants(g[1]), .rotated(r[1]));
  subset_rr_harness #(.N(6), .FRAME_SIZE(1), .CLOCK_GATING(1'b0)) h2 (
    .clk, .rst_n, .max_wait, .checks(c[2]), .failures(f[2]), .grants(g[2]), .rotated(r[2]));
  subset_rr_harness #(.N(6), .FRAME_SIZE(6), .CLOCK_GATING(1'b0)) h3 (
    .clk, .rst_n, .max_wait, .checks(c[3]), .failures(f[3]), .grants(g[3]), .rotated(r[3]));

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    max_wait = 0;  repeat (PHASE) @(posedge clk);
    max_wait = 5;  repeat (PHASE) @(posedge clk);
    max_wait = 25; repeat (PHASE) @(posedge clk);
    max_wait = 45; repeat (PHASE) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks   += c[i];
      failures += f[i];
      $display("config %0d: grants=%0d rotated=%0d", i, g[i], r[i]);
      checks++;
      if (g[i] == 0) begin failures++; $display("FAIL config %0d never granted", i); end
    end
    checks += 3;
    if (r[0] == 0) begin failures++; $display("FAIL no in-frame RR rotation (N=12,F=3)"); end
    if (r[1] == 0) begin failures++; $display("FAIL no in-frame RR rotation (N=10,F=4)"); end
    if (r[2] != 0) begin failures++; $display("FAIL frame size 1 rotated"); end
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
