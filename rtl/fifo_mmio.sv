// fifo_mmio: the FIFO register, memory-mapped into the IO space of two cores.
//
// The producer core pushes by writing IO_FIFO_DATA; the consumer core pops
// by reading IO_FIFO_DATA, which returns the oldest item. Either core reads
// IO_FIFO_STATUS to poll the flags {full, half_full, empty} (bit positions
// in mpsoc_pkg). Other accesses read as zero and do nothing: a consumer
// write or a producer data read never disturbs the queue.
//
// Timing: IO read data is combinational, valid in the cycle of the request;
// pushes and pops take effect at the rising edge of `clk`. `access` is high
// when either core touches the register, to enable its gated clock.
// The memory-mapped FIFO and its three flags follow the modelled system;
// the address map and status layout are this design's choices.
module fifo_mmio
  import mpsoc_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  io_req_t           prod_io,
  output logic [DATA_W-1:0] prod_rdata,
  input  io_req_t           cons_io,
  output logic [DATA_W-1:0] cons_rdata,
  output logic              access,
  output logic              empty,
  output logic              half_full,
  output logic              full
);

  logic              push, pop;
  logic [DATA_W-1:0] head, status;
  logic [$clog2(DEPTH+1)-1:0] count;

  assign push = prod_io.wr & (prod_io.addr == IO_FIFO_DATA);
  assign pop  = cons_io.rd & (cons_io.addr == IO_FIFO_DATA);

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (push),
    .wr_data   (prod_io.wdata),
    .rd_en     (pop),
    .rd_data   (head),
    .empty     (empty),
    .half_full (half_full),
    .full      (full),
    .count     (count)
  );

  always_comb begin
    status               = '0;
    status[ST_EMPTY]     = empty;
    status[ST_HALF_FULL] = half_full;
    status[ST_FULL]      = full;
  end

  always_comb begin
    prod_rdata = '0;
    if (prod_io.rd && prod_io.addr == IO_FIFO_STATUS) prod_rdata = status;
    cons_rdata = '0;
    if (cons_io.rd && cons_io.addr == IO_FIFO_STATUS) cons_rdata = status;
    else if (pop && !empty)                           cons_rdata = head;
  end

  assign access = prod_io.rd | prod_io.wr | cons_io.rd | cons_io.wr;

endmodule
