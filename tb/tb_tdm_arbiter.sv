// tb_tdm_arbiter: self-checking test of tdm_arbiter, counter and ring versions.
//
// Both versions (N=12) see the same random contenders at full, high, mid and
// low load. A reference slot index, advanced every cycle from 0 after reset,
// predicts the grant: the slot owner if it requests, nothing otherwise. Both
// DUTs must match it one cycle after the requests. The test also checks that
// no request waits more than N cycles and that wasted slots (a request
// pending elsewhere but no grant) do occur, the known cost of TDM.
module tb_tdm_arbiter;
  import arb_pkg::*;
  localparam int unsigned N = 12;
  localparam int unsigned PHASE = 600;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] req, gnt, gnt_ring, exp_q;
  int unsigned max_wait = 0;
  int checks = 0, failures = 0;
  int s = 0;
  int unsigned wait_cnt [N];
  int wasted = 0;

  always #5 clk = ~clk;

  arb_contenders #(.N(N)) u_cont (.clk, .rst_n, .max_wait, .gnt, .req);

  tdm_arbiter #(.N(N), .IMPL(TDM_COUNTER)) dut      (.clk, .rst_n, .req, .gnt);
  tdm_arbiter #(.N(N), .IMPL(TDM_RING))    dut_ring (.clk, .rst_n, .req, .gnt(gnt_ring));

  always @(posedge clk) begin
    if (!rst_n) begin
      exp_q <= '0;
      s     <= 0;
    end else begin
      automatic logic [N-1:0] e = '0;
      e[s] = req[s];
      exp_q <= e;
      s     <= (s + 1) % N;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks += 2;
      if (gnt !== exp_q) begin
        failures++;
        $display("FAIL t=%0t counter gnt=%b exp=%b", $time, gnt, exp_q);
      end
      if (gnt_ring !== exp_q) begin
        failures++;
        $display("FAIL t=%0t ring gnt=%b exp=%b", $time, gnt_ring, exp_q);
      end
      if (gnt == '0 && req != '0) wasted++;
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
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    max_wait = 0;  repeat (PHASE) @(posedge clk);
    max_wait = 5;  repeat (PHASE) @(posedge clk);
    max_wait = 25; repeat (PHASE) @(posedge clk);
    max_wait = 45; repeat (PHASE) @(posedge clk);
    checks++;
    if (wasted == 0) begin
      failures++;
      $display("FAIL no wasted slot observed");
    end
    $display("wasted slots=%0d", wasted);
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
