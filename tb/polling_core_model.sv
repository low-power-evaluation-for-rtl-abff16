// polling_core_model: behavioural stand-in for one processor core running the
// polling producer or consumer program of the two-core system.
//
// The real cores are generated 16-bit processors whose instruction set is
// not modelled; this model reproduces what their programs do on the ports:
//  * after reset the core is halted; its first `wake` (an interrupt) starts
//    the program, after which interrupts are ignored; `halt` stops it for
//    good (halted goes high);
//  * every running cycle fetches one word from program memory (a loop over
//    PROG_WORDS words; the time-out loop keeps fetching its one instruction);
//  * a time-out of PERIOD cycles, then one status read of the FIFO register;
//  * producer: if empty or half full, move BURST words from its data-memory
//    circular buffer (BUF_WORDS words) to the FIFO, two cycles per word
//    (memory read, then IO write);
//    consumer: if half full or full, move BURST words from the FIFO into its
//    data-memory circular buffer, one cycle per word (IO read, memory write).
// Counters of polls, bursts and moved items are outputs for the testbench.
module polling_core_model
  import mpsoc_pkg::*;
#(
  parameter bit          PRODUCER   = 1'b1,
  parameter int unsigned PERIOD     = 1024,
  parameter int unsigned BUF_WORDS  = 8192,
  parameter int unsigned BURST      = 16,
  parameter int unsigned PROG_WORDS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wake,
  input  logic              halt,
  output logic              halted,
  output mem_req_t          pmem_req,
  input  logic [DATA_W-1:0] pmem_rdata,
  output mem_req_t          dmem_req,
  input  logic [DATA_W-1:0] dmem_rdata,
  output io_req_t           io_req,
  input  logic [DATA_W-1:0] io_rdata,
  output int                polls,
  output int                bursts,
  output int                items
);

  typedef enum logic [2:0] {S_HALTED, S_TIMEOUT, S_POLL, S_MEMRD, S_IOWR, S_IORD, S_STOPPED} state_e;

  state_e      state;
  int unsigned tcnt, bcnt, ptr, pc;
  bit          woken;

  // combinational port drive from state
  always_comb begin
    pmem_req = '0;
    dmem_req = '0;
    io_req   = '0;
    halted   = (state == S_HALTED) || (state == S_STOPPED);
    if (!halted) begin
      pmem_req.ce   = 1'b1;
      pmem_req.addr = MEM_AW'(pc);
    end
    case (state)
      S_POLL: begin
        io_req.rd   = 1'b1;
        io_req.addr = IO_FIFO_STATUS;
      end
      S_MEMRD: begin
        dmem_req.ce   = 1'b1;
        dmem_req.addr = MEM_AW'(ptr);
      end
      S_IOWR: begin
        io_req.wr    = 1'b1;
        io_req.addr  = IO_FIFO_DATA;
        io_req.wdata = dmem_rdata;
      end
      S_IORD: begin
        io_req.rd      = 1'b1;
        io_req.addr    = IO_FIFO_DATA;
        dmem_req.ce    = 1'b1;
        dmem_req.we    = 1'b1;
        dmem_req.addr  = MEM_AW'(ptr);
        dmem_req.wdata = io_rdata;
      end
      default: ;
    endcase
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_HALTED;
      tcnt   <= 0;
      bcnt   <= 0;
      ptr    <= 0;
      pc     <= 0;
      woken  <= 1'b0;
      polls  <= 0;
      bursts <= 0;
      items  <= 0;
    end else if (halt && state != S_HALTED) begin
      state <= S_STOPPED;
    end else begin
      if (!halted) pc <= (state == S_TIMEOUT) ? pc : (pc + 1) % PROG_WORDS;
      case (state)
        S_HALTED: if (wake && !woken) begin
          woken <= 1'b1;
          state <= S_TIMEOUT;
          tcnt  <= PERIOD;
        end
        S_TIMEOUT: begin
          if (tcnt <= 1) state <= S_POLL;
          else           tcnt  <= tcnt - 1;
        end
        S_POLL: begin
          automatic logic go;
          polls <= polls + 1;
          go = PRODUCER ? (io_rdata[ST_EMPTY] | io_rdata[ST_HALF_FULL])
                        : (io_rdata[ST_HALF_FULL] | io_rdata[ST_FULL]);
          bcnt <= BURST;
          if (go) begin
            state  <= PRODUCER ? S_MEMRD : S_IORD;
            bursts <= bursts + 1;
          end else begin
            state <= S_TIMEOUT;
            tcnt  <= PERIOD;
          end
        end
        S_MEMRD: state <= S_IOWR;
        S_IOWR, S_IORD: begin
          items <= items + 1;
          ptr   <= (ptr + 1) % BUF_WORDS;
          if (bcnt <= 1) begin
            state <= S_TIMEOUT;
            tcnt  <= PERIOD;
          end else begin
            bcnt  <= bcnt - 1;
            state <= PRODUCER ? S_MEMRD : S_IORD;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
