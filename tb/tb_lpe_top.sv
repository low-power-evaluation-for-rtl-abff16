// tb_lpe_top: end-to-end test of lpe_top at its default parameters.
//
// Arbiters (12 contenders each): four random contender groups, cycled
// through full, high, mid and low load, drive the seven lanes in pairs that
// must agree cycle by cycle: RR plain/gated, TDM counter/ring, TDM+RR
// plain/gated; the TDM+subset(RR) lane runs on its own group. Every lane is
// checked for one-hot grants that go only to requesters and for a bounded
// wait. Counted mechanisms: RR grants, cycles with the gated RR priority
// clock stopped, wasted TDM slots, TDM-step and RR-step grants of TDM+RR,
// TDM+subset(RR) grants.
// Producer/consumer system: polling core models with a 1024-cycle time-out;
// the producer is woken first, the consumer two periods later. The run ends
// when the consumer has received 8192+256 samples, i.e. once round the
// 8192-word circular buffers and on. Checked: data in order, FIFO occupancy,
// no core clock before wake or after halt. Counted mechanisms: FIFO empty,
// half full and full, producer and consumer bursts, buffer wrap-around.
// Each mechanism that never happens counts as a failure.
module tb_lpe_top;
  import arb_pkg::*;
  import mpsoc_pkg::*;

  localparam int unsigned N      = 12;
  localparam int unsigned PERIOD = 1024;
  localparam int unsigned ITEMS  = 8192 + 256;
  localparam int unsigned LOADS [4] = '{0, 5, 25, 45};

  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
  logic [NUM_ARB_CFG-1:0][N-1:0] arb_req, arb_gnt;
  logic [1:0] tdm_rr_by_rr;
  logic [1:0] wake = '0, halt = '0, core_halted, core_clk, halted;
  mem_req_t [1:0] pmem_req, dmem_req;
  io_req_t  [1:0] io_req;
  logic [1:0][DATA_W-1:0] pmem_rdata, dmem_rdata, io_rdata;
  logic fifo_empty, fifo_half_full, fifo_full;

  lpe_top dut (
    .clk, .rst_n, .arb_req, .arb_gnt, .tdm_rr_by_rr,
    .wake, .core_halted, .core_clk, .halted,
    .pmem_req, .pmem_rdata, .dmem_req, .dmem_rdata, .io_req, .io_rdata,
    .fifo_empty, .fifo_half_full, .fifo_full
  );

  always #5 clk = ~clk;

  // ---------------- arbiter stimulus ----------------
  int unsigned max_wait = 0;
  logic [N-1:0] req_a, req_b, req_c, req_d;

  arb_contenders #(.N(N)) u_ca (.clk, .rst_n, .max_wait, .gnt (arb_gnt[ARB_RR]),        .req (req_a));
  arb_contenders #(.N(N)) u_cb (.clk, .rst_n, .max_wait, .gnt (arb_gnt[ARB_TDM_CNT]),   .req (req_b));
  arb_contenders #(.N(N)) u_cc (.clk, .rst_n, .max_wait, .gnt (arb_gnt[ARB_TDM_RR]),    .req (req_c));
  arb_contenders #(.N(N)) u_cd (.clk, .rst_n, .max_wait, .gnt (arb_gnt[ARB_TDM_SUBRR]), .req (req_d));

  always_comb begin
    arb_req                = '0;
    arb_req[ARB_RR]        = req_a;
    arb_req[ARB_RR_CG]     = req_a;
    arb_req[ARB_TDM_CNT]   = req_b;
    arb_req[ARB_TDM_RING]  = req_b;
    arb_req[ARB_TDM_RR]    = req_c;
    arb_req[ARB_TDM_RR_CG] = req_c;
    arb_req[ARB_TDM_SUBRR] = req_d;
  end

  // mechanism counters
  int n_rr = 0, n_cg_stopped = 0, n_wasted = 0, n_tdmrr_tdm = 0, n_tdmrr_rr = 0, n_sub = 0;
  int n_empty = 0, n_half = 0, n_full = 0, n_wrap = 0;
  logic [NUM_ARB_CFG-1:0][N-1:0] req_prev;
  int unsigned waitc [NUM_ARB_CFG][N];
  bit cg_ticked;
  bit arb_running = 1'b0, sys_running = 1'b0;

  always @(posedge clk) req_prev <= arb_req;
  always @(posedge dut.u_rr_cg.g_cg.prio_clk) cg_ticked = 1'b1;

  always @(negedge clk) begin
    if (arb_running) begin
      checks += 3;
      if (arb_gnt[ARB_RR_CG] !== arb_gnt[ARB_RR]) begin
        failures++; $display("FAIL t=%0t RR gated/plain differ", $time);
      end
      if (arb_gnt[ARB_TDM_RING] !== arb_gnt[ARB_TDM_CNT]) begin
        failures++; $display("FAIL t=%0t TDM ring/counter differ", $time);
      end
      if (arb_gnt[ARB_TDM_RR_CG] !== arb_gnt[ARB_TDM_RR] || tdm_rr_by_rr[0] !== tdm_rr_by_rr[1]) begin
        failures++; $display("FAIL t=%0t TDM+RR gated/plain differ", $time);
      end
      for (int a = 0; a < int'(NUM_ARB_CFG); a++) begin
        automatic int bound = (a == int'(ARB_TDM_SUBRR)) ? int'(N) + 4 : int'(N);
        checks++;
        if (!$onehot0(arb_gnt[a]) || (arb_gnt[a] & ~req_prev[a]) != '0) begin
          failures++; $display("FAIL t=%0t lane %0d grant %b req %b", $time, a, arb_gnt[a], req_prev[a]);
        end
        for (int i = 0; i < int'(N); i++) begin
          if (arb_req[a][i] && !arb_gnt[a][i]) waitc[a][i]++;
          else waitc[a][i] = 0;
          if (waitc[a][i] > bound) begin
            failures++; $display("FAIL lane %0d contender %0d starved", a, i);
            waitc[a][i] = 0;
          end
        end
      end
      if (|arb_gnt[ARB_RR]) n_rr++;
      if (!cg_ticked) n_cg_stopped++;
      cg_ticked = 1'b0;
      if (arb_gnt[ARB_TDM_CNT] == '0 && req_prev[ARB_TDM_CNT] != '0) n_wasted++;
      if (|arb_gnt[ARB_TDM_RR] && !tdm_rr_by_rr[0]) n_tdmrr_tdm++;
      if (|arb_gnt[ARB_TDM_RR] &&  tdm_rr_by_rr[0]) n_tdmrr_rr++;
      if (|arb_gnt[ARB_TDM_SUBRR]) n_sub++;
    end
  end

  // ---------------- core models ----------------
  int p_polls, p_bursts, p_items, c_polls, c_bursts, c_items;

  polling_core_model #(.PRODUCER(1'b1), .PERIOD(PERIOD)) u_prod (
    .clk (core_clk[0]), .rst_n, .wake (wake[0]), .halt (halt[0]), .halted (core_halted[0]),
    .pmem_req (pmem_req[0]), .pmem_rdata (pmem_rdata[0]),
    .dmem_req (dmem_req[0]), .dmem_rdata (dmem_rdata[0]),
    .io_req (io_req[0]), .io_rdata (io_rdata[0]),
    .polls (p_polls), .bursts (p_bursts), .items (p_items)
  );

  polling_core_model #(.PRODUCER(1'b0), .PERIOD(PERIOD)) u_cons (
    .clk (core_clk[1]), .rst_n, .wake (wake[1]), .halt (halt[1]), .halted (core_halted[1]),
    .pmem_req (pmem_req[1]), .pmem_rdata (pmem_rdata[1]),
    .dmem_req (dmem_req[1]), .dmem_rdata (dmem_rdata[1]),
    .io_req (io_req[1]), .io_rdata (io_rdata[1]),
    .polls (c_polls), .bursts (c_bursts), .items (c_items)
  );

  int core_edges = 0;
  always @(posedge core_clk[0] or posedge core_clk[1]) core_edges++;

  always @(negedge clk) begin
    if (sys_running) begin
      automatic int occ = int'(dut.u_mpsoc.u_fifo.u_fifo.count);
      checks++;
      if (occ != p_items - c_items || occ > int'(FIFO_DEPTH)) begin
        failures++; $display("FAIL t=%0t FIFO occupancy %0d vs %0d", $time, occ, p_items - c_items);
      end
      if (fifo_empty) n_empty++;
      if (fifo_half_full) n_half++;
      if (fifo_full) n_full++;
      if (dmem_req[1].ce && dmem_req[1].we && dmem_req[1].addr == '0 && c_items > 0) n_wrap++;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    for (int k = 0; k < 8192; k++) begin
      dut.u_mpsoc.g_core[0].u_dmem.mem[k] = 16'(k * 3 + 7);
      dut.u_mpsoc.g_core[1].u_dmem.mem[k] = 16'hffff;
    end
    for (int k = 8192; k < 16384; k++) dut.u_mpsoc.g_core[1].u_dmem.mem[k] = 16'hffff;
    foreach (waitc[a, i]) waitc[a][i] = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(negedge clk);
    checks++;
    if (core_edges != 0 || halted != 2'b11) begin
      failures++; $display("FAIL cores clocked before wake");
    end
    arb_running = 1'b1;
    sys_running = 1'b1;
    wake = 2'b01;
    repeat (3) @(negedge clk);
    wake = 2'b00;
    repeat (2 * PERIOD + 100) @(negedge clk);
    wake = 2'b10;
    repeat (3) @(negedge clk);
    wake = 2'b00;
    while (c_items < int'(ITEMS)) begin
      repeat (1000) @(negedge clk);
      max_wait = LOADS[(c_items / 64) % 4];
    end
    while (u_prod.state != u_prod.S_TIMEOUT) @(negedge clk);
    halt = 2'b11;
    repeat (3) @(negedge clk);
    halt = 2'b00;
    sys_running = 1'b0;
    arb_running = 1'b0;
    core_edges = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (core_edges != 0 || halted != 2'b11) begin
      failures++; $display("FAIL cores clocked after halt");
    end
    // data: consumer buffer holds the producer samples, nothing beyond it
    for (int k = 0; k < 8192; k++) begin
      checks++;
      if (dut.u_mpsoc.g_core[1].u_dmem.mem[k] !== 16'(k * 3 + 7)) begin
        failures++; $display("FAIL consumer word %0d = %h", k, dut.u_mpsoc.g_core[1].u_dmem.mem[k]);
      end
    end
    for (int k = 8192; k < 16384; k++) begin
      checks++;
      if (dut.u_mpsoc.g_core[1].u_dmem.mem[k] !== 16'hffff) begin
        failures++; $display("FAIL consumer wrote past its buffer at %0d", k);
      end
    end
    $display("arbiters: rr=%0d cg_stopped=%0d wasted=%0d tdmrr_tdm=%0d tdmrr_rr=%0d subset=%0d",
             n_rr, n_cg_stopped, n_wasted, n_tdmrr_tdm, n_tdmrr_rr, n_sub);
    $display("system: items=%0d bursts=%0d/%0d polls=%0d/%0d empty=%0d half=%0d full=%0d wrap=%0d",
             c_items, p_bursts, c_bursts, p_polls, c_polls, n_empty, n_half, n_full, n_wrap);
    checks += 14;
    if (n_rr == 0)         begin failures++; $display("FAIL no RR grant"); end
    if (n_cg_stopped == 0) begin failures++; $display("FAIL gated RR clock never stopped"); end
    if (n_wasted == 0)     begin failures++; $display("FAIL no wasted TDM slot"); end
    if (n_tdmrr_tdm == 0)  begin failures++; $display("FAIL no TDM-step grant"); end
    if (n_tdmrr_rr == 0)   begin failures++; $display("FAIL no RR-step grant"); end
    if (n_sub == 0)        begin failures++; $display("FAIL no TDM+subset(RR) grant"); end
    if (n_empty == 0)      begin failures++; $display("FAIL FIFO never empty"); end
    if (n_half == 0)       begin failures++; $display("FAIL FIFO never half full"); end
    if (n_full == 0)       begin failures++; $display("FAIL FIFO never full"); end
    if (p_bursts == 0)     begin failures++; $display("FAIL no producer burst"); end
    if (c_bursts == 0)     begin failures++; $display("FAIL no consumer burst"); end
    if (n_wrap < 1)        begin failures++; $display("FAIL buffer never wrapped"); end
    if (p_polls <= p_bursts) begin failures++; $display("FAIL producer never polled without a burst"); end
    if (c_polls <= c_bursts) begin failures++; $display("FAIL consumer never polled without a burst"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 1200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
