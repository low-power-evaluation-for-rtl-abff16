// sram_sp: single-port synchronous memory, used for the program and data
// memories of both processor cores.
//
// One access per cycle when `ce` is high: a write stores `wdata` at `addr`,
// a read returns the word at `addr` on `rdata` after the next rising edge
// (one cycle latency); `rdata` holds its value between reads. The contents
// are not reset. Size 16k x 16 bit follows the modelled system, whose memories
// were compiled macros; this array is the functional equivalent, with the
// write-first/read-hold behaviour chosen here.
module sram_sp #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     ce,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
