// mpsoc_pkg: types and constants of the producer/consumer system.
//
// Both processor cores reach the shared FIFO through their IO space and
// their program and data memories through a single-port memory request.
// The IO address map and the bit positions of the FIFO flags in the status
// word are this design's own choice; the FIFO size (32 x 16 bit), the memory
// size (16k x 16 bit) and the burst length of 16 items follow the producer/
// consumer system being modelled.
package mpsoc_pkg;

  localparam int unsigned DATA_W     = 16;     // processor word and FIFO width
  localparam int unsigned IO_AW      = 8;      // IO address width
  localparam int unsigned MEM_DEPTH  = 16384;  // words per program/data memory
  localparam int unsigned MEM_AW     = $clog2(MEM_DEPTH);
  localparam int unsigned FIFO_DEPTH = 32;     // FIFO items
  localparam int unsigned BURST_LEN  = 16;     // items moved per successful poll

  // IO address map of the memory-mapped FIFO register
  localparam logic [IO_AW-1:0] IO_FIFO_DATA   = 8'h00;  // write: push, read: pop
  localparam logic [IO_AW-1:0] IO_FIFO_STATUS = 8'h01;  // read: flag word

  // bit positions of the flags in the status word
  localparam int unsigned ST_EMPTY     = 0;
  localparam int unsigned ST_HALF_FULL = 1;
  localparam int unsigned ST_FULL      = 2;

  // IO request of one core (read data returns combinationally in the same cycle)
  typedef struct packed {
    logic              rd;
    logic              wr;
    logic [IO_AW-1:0]  addr;
    logic [DATA_W-1:0] wdata;
  } io_req_t;

  // memory request of one core towards a single-port memory
  typedef struct packed {
    logic              ce;
    logic              we;
    logic [MEM_AW-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

endpackage
