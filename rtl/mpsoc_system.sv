// mpsoc_system: two-processor producer/consumer system around a hardware FIFO.
//
// A producer core and a consumer core, each with its own 16k x 16 program
// memory and data memory, exchange data through a 32 x 16 FIFO that is
// memory-mapped into both cores' IO space (fifo_mmio). Every component sits
// behind its own clock_gate cell, seven in all:
//   core clocks   run while the core is not halted, or while its wake line
//                 is high (the wake line is also the core's interrupt, so a
//                 halted core is clocked long enough to take it);
//   memory clocks run in cycles in which the owning core accesses them;
//   FIFO clock    runs in cycles in which either core accesses the FIFO.
// The cores themselves are not part of this module: their memory requests,
// IO requests and halted flags come in through ports, and their gated clocks
// go out on `core_clk`. Index 0 is the producer, index 1 the consumer.
//
// Timing: memories return read data one cycle after the request; IO reads
// are combinational. Requests are expected to be launched from `core_clk`,
// whose edges coincide with those of `clk`.
// The component set, sizes, per-component gating and the wake input follow
// the modelled system; the gating conditions and port grouping are this
// design's choices.
module mpsoc_system
  import mpsoc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic     [1:0]         wake,
  input  logic     [1:0]         core_halted,
  output logic     [1:0]         core_clk,
  output logic     [1:0]         halted,
  input  mem_req_t [1:0]         pmem_req,
  output logic     [1:0][DATA_W-1:0] pmem_rdata,
  input  mem_req_t [1:0]         dmem_req,
  output logic     [1:0][DATA_W-1:0] dmem_rdata,
  input  io_req_t  [1:0]         io_req,
  output logic     [1:0][DATA_W-1:0] io_rdata,
  output logic                   fifo_empty,
  output logic                   fifo_half_full,
  output logic                   fifo_full
);

  logic       fifo_clk, fifo_access;
  logic [1:0] pmem_clk, dmem_clk;

  assign halted = core_halted;

  for (genvar c = 0; c < 2; c++) begin : g_core
    clock_gate u_core_gate (
      .clk     (clk),
      .en      (~core_halted[c] | wake[c]),
      .test_en (1'b0),
      .gclk    (core_clk[c])
    );

    clock_gate u_pmem_gate (
      .clk     (clk),
      .en      (pmem_req[c].ce),
      .test_en (1'b0),
      .gclk    (pmem_clk[c])
    );

    clock_gate u_dmem_gate (
      .clk     (clk),
      .en      (dmem_req[c].ce),
      .test_en (1'b0),
      .gclk    (dmem_clk[c])
    );

    sram_sp #(.DEPTH(MEM_DEPTH), .WIDTH(DATA_W)) u_pmem (
      .clk   (pmem_clk[c]),
      .ce    (pmem_req[c].ce),
      .we    (pmem_req[c].we),
      .addr  (pmem_req[c].addr),
      .wdata (pmem_req[c].wdata),
      .rdata (pmem_rdata[c])
    );

    sram_sp #(.DEPTH(MEM_DEPTH), .WIDTH(DATA_W)) u_dmem (
      .clk   (dmem_clk[c]),
      .ce    (dmem_req[c].ce),
      .we    (dmem_req[c].we),
      .addr  (dmem_req[c].addr),
      .wdata (dmem_req[c].wdata),
      .rdata (dmem_rdata[c])
    );
  end

  clock_gate u_fifo_gate (
    .clk     (clk),
    .en      (fifo_access),
    .test_en (1'b0),
    .gclk    (fifo_clk)
  );

  fifo_mmio #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk        (fifo_clk),
    .rst_n      (rst_n),
    .prod_io    (io_req[0]),
    .prod_rdata (io_rdata[0]),
    .cons_io    (io_req[1]),
    .cons_rdata (io_rdata[1]),
    .access     (fifo_access),
    .empty      (fifo_empty),
    .half_full  (fifo_half_full),
    .full       (fifo_full)
  );

endmodule
