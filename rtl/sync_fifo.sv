// sync_fifo: single-clock FIFO with empty, half-full and full flags.
//
// A circular queue over a register-file store, addressed by a binary write
// pointer and a binary read pointer that each wrap at DEPTH; an occupancy
// counter gives the flags. A push stores wr_data at the write pointer and
// advances it; a pop advances the read pointer. Pushes while full and pops
// while empty are ignored, so the queue never corrupts itself.
//
// Interface: rd_data always shows the oldest item (first-word fall-through);
// wr_en/rd_en act at the rising clock edge, both may be high in one cycle.
// Flags and `count` are registered state, valid the cycle after the edge.
// `half_full` is high when exactly DEPTH/2 items are stored: with producer
// and consumer moving DEPTH/2 items per turn the occupancy is 0, DEPTH/2 or
// DEPTH at each poll, and "empty or half full" (producer) and "half full or
// full" (consumer) are then the exact conditions for a safe burst.
// Size (32 x 16 bit) and flag set follow the modelled system; flip-flop
// storage, binary pointers and the exact-half reading of `half_full` are
// this design's choices.
module sync_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     half_full,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr_en & ~full;
  assign do_rd = rd_en & ~empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  assign rd_data   = mem[rptr];
  assign empty     = (count == '0);
  assign full      = (count == CW'(DEPTH));
  assign half_full = (count == CW'(DEPTH / 2));

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule
