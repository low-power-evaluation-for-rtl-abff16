// lpe_top: the arbiter configurations and the producer/consumer system.
//
// Two independent designs stand side by side and share only clock and reset.
//   Arbiters: the seven configurations compared for power (round-robin,
//   plain and clock-gated; TDM with a binary counter and with a ring
//   counter; TDM+RR, plain and clock-gated; TDM+subset(RR)), each with its
//   own N-contender request and grant lane in arb_req/arb_gnt, indexed by
//   arb_pkg::arb_cfg_e. tdm_rr_by_rr[0]/[1] flag grants made by the RR step
//   of the plain/gated TDM+RR arbiter.
//   Producer/consumer system: mpsoc_system, whose processor cores attach
//   through the core-side ports (index 0 producer, index 1 consumer).
// Timing of each part is that of its module: grants one cycle after the
// request, memory reads one cycle after the request, IO reads in the cycle.
// N_CONTENDERS defaults to 12, the largest arbiter size evaluated for the
// modelled design; FRAME_SIZE of the TDM+subset(RR) arbiter is this design's
// choice.
module lpe_top
  import arb_pkg::*;
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_CONTENDERS = 12,
  parameter int unsigned FRAME_SIZE   = 3
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // arbiters
  input  logic     [NUM_ARB_CFG-1:0][N_CONTENDERS-1:0] arb_req,
  output logic     [NUM_ARB_CFG-1:0][N_CONTENDERS-1:0] arb_gnt,
  output logic     [1:0]                            tdm_rr_by_rr,
  // producer/consumer system
  input  logic     [1:0]                            wake,
  input  logic     [1:0]                            core_halted,
  output logic     [1:0]                            core_clk,
  output logic     [1:0]                            halted,
  input  mem_req_t [1:0]                            pmem_req,
  output logic     [1:0][DATA_W-1:0]                pmem_rdata,
  input  mem_req_t [1:0]                            dmem_req,
  output logic     [1:0][DATA_W-1:0]                dmem_rdata,
  input  io_req_t  [1:0]                            io_req,
  output logic     [1:0][DATA_W-1:0]                io_rdata,
  output logic                                      fifo_empty,
  output logic                                      fifo_half_full,
  output logic                                      fifo_full
);

  localparam int unsigned N = N_CONTENDERS;

  rr_arbiter #(.N(N), .CLOCK_GATING(1'b0)) u_rr (
    .clk (clk), .rst_n (rst_n), .req (arb_req[ARB_RR]), .gnt (arb_gnt[ARB_RR])
  );

  rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) u_rr_cg (
    .clk (clk), .rst_n (rst_n), .req (arb_req[ARB_RR_CG]), .gnt (arb_gnt[ARB_RR_CG])
  );

  tdm_arbiter #(.N(N), .IMPL(TDM_COUNTER)) u_tdm_cnt (
    .clk (clk), .rst_n (rst_n), .req (arb_req[ARB_TDM_CNT]), .gnt (arb_gnt[ARB_TDM_CNT])
  );

  tdm_arbiter #(.N(N), .IMPL(TDM_RING)) u_tdm_ring (
    .clk (clk), .rst_n (rst_n), .req (arb_req[ARB_TDM_RING]), .gnt (arb_gnt[ARB_TDM_RING])
  );

  tdm_rr_arbiter #(.N(N), .CLOCK_GATING(1'b0)) u_tdm_rr (
    .clk (clk), .rst_n (rst_n), .req (arb_req[ARB_TDM_RR]), .gnt (arb_gnt[ARB_TDM_RR]),
    .gnt_by_rr (tdm_rr_by_rr[0])
  );

  tdm_rr_arbiter #(.N(N), .CLOCK_GATING(1'b1)) u_tdm_rr_cg (
    .clk (clk), .rst_n (rst_n), .req (arb_req[ARB_TDM_RR_CG]), .gnt (arb_gnt[ARB_TDM_RR_CG]),
    .gnt_by_rr (tdm_rr_by_rr[1])
  );

  tdm_subset_rr_arbiter #(.N(N), .FRAME_SIZE(FRAME_SIZE), .CLOCK_GATING(1'b0)) u_tdm_subrr (
    .clk (clk), .rst_n (rst_n), .req (arb_req[ARB_TDM_SUBRR]), .gnt (arb_gnt[ARB_TDM_SUBRR])
  );

  mpsoc_system u_mpsoc (
    .clk            (clk),
    .rst_n          (rst_n),
    .wake           (wake),
    .core_halted    (core_halted),
    .core_clk       (core_clk),
    .halted         (halted),
    .pmem_req       (pmem_req),
    .pmem_rdata     (pmem_rdata),
    .dmem_req       (dmem_req),
    .dmem_rdata     (dmem_rdata),
    .io_req         (io_req),
    .io_rdata       (io_rdata),
    .fifo_empty     (fifo_empty),
    .fifo_half_full (fifo_half_full),
    .fifo_full      (fifo_full)
  );

endmodule
