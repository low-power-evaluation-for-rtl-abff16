// mpsoc_harness: one producer/consumer system with both polling core models,
// run at one time-out PERIOD, for use by tb_mpsoc_system.
//
// The producer's data memory is preloaded with linearly increasing samples
// (word k holds k). After reset the harness checks that neither core is
// clocked, wakes the producer and, two periods later, the consumer, and lets them run until the consumer has
// received ITEMS words; it then halts both cores. It checks:
//  * every word in the consumer's data memory equals the producer's sample;
//  * the FIFO occupancy always equals words produced minus words consumed
//    and never exceeds the FIFO depth;
//  * producer polls are PERIOD+1 cycles apart, or PERIOD+1+2*BURST_LEN when
//    a burst was moved in between;
//  * each core leaves the halted state within three cycles of its wake pulse;
//  * gated clocks: no core clock before wake or after halt, and data-memory
//    and FIFO clocks run in only a fraction of the cycles.
// Results are returned as counters; `done` rises when the run is over.
module mpsoc_harness
  import mpsoc_pkg::*;
#(
  parameter int unsigned PERIOD = 1024,
  parameter int unsigned ITEMS  = 256
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   polls,
  output int   fifo_clk_edges,
  output int   dmem_clk_edges,
  output int   n_full,
  output int   n_half,
  output bit   done
);
  logic [1:0] wake = '0, halt = '0, core_halted, core_clk, halted;
  mem_req_t [1:0] pmem_req, dmem_req;
  io_req_t  [1:0] io_req;
  logic [1:0][DATA_W-1:0] pmem_rdata, dmem_rdata, io_rdata;
  logic fifo_empty, fifo_half_full, fifo_full;
  int p_polls, p_bursts, p_items, c_polls, c_bursts, c_items;
  int core_edges = 0, last_poll = -1;
  bit running = 1'b0;

  mpsoc_system dut (
    .clk, .rst_n, .wake, .core_halted, .core_clk, .halted,
    .pmem_req, .pmem_rdata, .dmem_req, .dmem_rdata, .io_req, .io_rdata,
    .fifo_empty, .fifo_half_full, .fifo_full
  );

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

  initial begin
    checks = 0; failures = 0; cycles = 0; polls = 0;
    fifo_clk_edges = 0; dmem_clk_edges = 0; n_full = 0; n_half = 0; done = 1'b0;
    for (int k = 0; k < 8192; k++) dut.g_core[0].u_dmem.mem[k] = 16'(k);
  end

  always @(posedge core_clk[0] or posedge core_clk[1]) core_edges++;
  always @(posedge dut.fifo_clk) if (running) fifo_clk_edges++;
  always @(posedge dut.dmem_clk[0]) if (running) dmem_clk_edges++;

  // per-cycle checks on the free-running clock
  always @(negedge clk) begin
    if (running) begin
      automatic int occ = int'(dut.u_fifo.u_fifo.count);
      cycles++;
      checks++;
      if (occ != p_items - c_items || occ > int'(FIFO_DEPTH)) begin
        failures++;
        $display("FAIL P=%0d occupancy %0d, produced %0d consumed %0d", PERIOD, occ, p_items, c_items);
      end
      if (fifo_full) n_full++;
      if (fifo_half_full) n_half++;
      if (io_req[0].rd && io_req[0].addr == IO_FIFO_STATUS) begin
        if (last_poll >= 0) begin
          automatic int d = cycles - last_poll;
          checks++;
          if (d != int'(PERIOD) + 1 && d != int'(PERIOD) + 1 + 2*int'(BURST_LEN)) begin
            failures++;
            $display("FAIL P=%0d poll interval %0d", PERIOD, d);
          end
        end
        last_poll = cycles;
      end
    end
  end

  initial begin
    @(posedge rst_n);
    repeat (20) @(posedge clk);
    checks++;
    if (core_edges != 0 || halted != 2'b11) begin
      failures++;
      $display("FAIL P=%0d cores clocked (%0d edges) or not halted before wake", PERIOD, core_edges);
    end
    @(negedge clk);
    // wake the producer first and the consumer two periods later, so that
    // the producer fills the FIFO up to full before the consumer starts
    wake = 2'b01;
    running = 1'b1;
    repeat (3) @(negedge clk);
    wake = 2'b00;
    checks++;
    if (core_halted[0] || core_edges == 0) begin
      failures++;
      $display("FAIL P=%0d producer did not start on wake", PERIOD);
    end
    repeat (2 * PERIOD + 100) @(negedge clk);
    wake = 2'b10;
    repeat (3) @(negedge clk);
    wake = 2'b00;
    checks++;
    if (core_halted[1]) begin
      failures++;
      $display("FAIL P=%0d consumer did not start on wake", PERIOD);
    end
    while (c_items < int'(ITEMS)) @(negedge clk);
    // let the producer finish a burst in flight, then halt both cores
    while (u_prod.state != u_prod.S_TIMEOUT) @(negedge clk);
    halt = 2'b11;
    repeat (3) @(negedge clk);
    halt = 2'b00;
    running = 1'b0;
    polls = p_polls;
    core_edges = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (core_edges != 0 || halted != 2'b11) begin
      failures++;
      $display("FAIL P=%0d cores still clocked after halt", PERIOD);
    end
    // data integrity: consumer buffer holds the producer's samples in order
    for (int k = 0; k < c_items; k++) begin
      checks++;
      if (dut.g_core[1].u_dmem.mem[k % 8192] !== 16'(k % 8192)) begin
        failures++;
        $display("FAIL P=%0d consumer word %0d = %h", PERIOD, k, dut.g_core[1].u_dmem.mem[k % 8192]);
      end
    end
    checks++;
    if (dmem_clk_edges == 0 || dmem_clk_edges >= cycles / 4 || fifo_clk_edges >= cycles / 4) begin
      failures++;
      $display("FAIL P=%0d memory/FIFO clock gating: dmem %0d fifo %0d of %0d cycles",
               PERIOD, dmem_clk_edges, fifo_clk_edges, cycles);
    end
    $display("P=%0d cycles=%0d polls=%0d bursts=%0d/%0d items=%0d fifo_clk=%0d dmem_clk=%0d full=%0d half=%0d",
             PERIOD, cycles, p_polls + c_polls, p_bursts, c_bursts, c_items,
             fifo_clk_edges, dmem_clk_edges, n_full, n_half);
    done = 1'b1;
  end
endmodule
