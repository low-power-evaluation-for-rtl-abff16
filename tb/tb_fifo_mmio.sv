// tb_fifo_mmio: self-checking test of the memory-mapped FIFO register.
//
// A producer port and a consumer port issue random IO accesses: data
// writes, status reads, data reads and accesses that must be ignored
// (consumer writes, producer data reads, unmapped addresses). A queue model
// checks popped data, the status word {full, half_full, empty} seen by both
// cores, the flag outputs and the `access` strobe. Directed bursts of 16
// items, as the polling software moves them, take the FIFO through empty,
// half-full and full.
module tb_fifo_mmio;
  import mpsoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  io_req_t prod_io, cons_io;
  logic [DATA_W-1:0] prod_rdata, cons_rdata;
  logic access, empty, half_full, full;
  logic [DATA_W-1:0] q [$];
  int checks = 0, failures = 0;
  int n_full = 0, n_half = 0;
  logic [DATA_W-1:0] next_val = 16'h1000;

  always #5 clk = ~clk;

  fifo_mmio #(.DEPTH(FIFO_DEPTH)) dut (
    .clk, .rst_n, .prod_io, .prod_rdata, .cons_io, .cons_rdata, .access, .empty, .half_full, .full
  );

  function automatic logic [DATA_W-1:0] exp_status();
    logic [DATA_W-1:0] s = '0;
    s[ST_EMPTY]     = (q.size() == 0);
    s[ST_HALF_FULL] = (q.size() == FIFO_DEPTH/2);
    s[ST_FULL]      = (q.size() == FIFO_DEPTH);
    return s;
  endfunction

  // one cycle: drive both ports, check combinational read data, clock
  task automatic cycle(input io_req_t p, input io_req_t c);
    prod_io = p;
    cons_io = c;
    #1;
    checks++;
    if (access !== (p.rd | p.wr | c.rd | c.wr)) begin failures++; $display("FAIL access"); end
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == FIFO_DEPTH) ||
        half_full !== (q.size() == FIFO_DEPTH/2)) begin
      failures++; $display("FAIL t=%0t flags size=%0d", $time, q.size());
    end
    if (p.rd) begin
      checks++;
      if (p.addr == IO_FIFO_STATUS ? prod_rdata !== exp_status() : prod_rdata !== '0) begin
        failures++; $display("FAIL t=%0t producer read %h", $time, prod_rdata);
      end
    end
    if (c.rd) begin
      checks++;
      if (c.addr == IO_FIFO_STATUS) begin
        if (cons_rdata !== exp_status()) begin failures++; $display("FAIL t=%0t consumer status %h", $time, cons_rdata); end
      end else if (c.addr == IO_FIFO_DATA && q.size() > 0) begin
        if (cons_rdata !== q[0]) begin failures++; $display("FAIL t=%0t pop %h exp %h", $time, cons_rdata, q[0]); end
      end else if (cons_rdata !== '0) begin
        failures++; $display("FAIL t=%0t consumer read %h", $time, cons_rdata);
      end
    end
    @(posedge clk);
    begin
      automatic bit was_full  = (q.size() == FIFO_DEPTH);
      automatic bit was_empty = (q.size() == 0);
      if (c.rd && c.addr == IO_FIFO_DATA && !was_empty) void'(q.pop_front());
      if (p.wr && p.addr == IO_FIFO_DATA && !was_full) q.push_back(p.wdata);
    end
    if (q.size() == FIFO_DEPTH) n_full++;
    if (q.size() == FIFO_DEPTH/2) n_half++;
    #1;
  endtask

  function automatic io_req_t idle();
    return '{rd: 1'b0, wr: 1'b0, addr: '0, wdata: '0};
  endfunction

  function automatic io_req_t wr_data(input logic [DATA_W-1:0] d);
    return '{rd: 1'b0, wr: 1'b1, addr: IO_FIFO_DATA, wdata: d};
  endfunction

  function automatic io_req_t rd(input logic [IO_AW-1:0] a);
    return '{rd: 1'b1, wr: 1'b0, addr: a, wdata: '0};
  endfunction

  initial begin
    prod_io = idle();
    cons_io = idle();
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(negedge clk);
    // two producer bursts of 16 -> half full -> full, then overflow attempt
    for (int b = 0; b < 2; b++) begin
      cycle(rd(IO_FIFO_STATUS), rd(IO_FIFO_STATUS));
      for (int i = 0; i < BURST_LEN; i++) begin cycle(wr_data(next_val), idle()); next_val++; end
    end
    cycle(wr_data(16'hdead), rd(IO_FIFO_STATUS));
    // ignored accesses
    cycle(rd(IO_FIFO_DATA), '{rd: 1'b0, wr: 1'b1, addr: IO_FIFO_DATA, wdata: 16'hbeef});
    cycle('{rd: 1'b1, wr: 1'b0, addr: 8'h7f, wdata: '0}, rd(8'h42));
    // consumer drains in two bursts, then underflow attempt
    for (int b = 0; b < 2; b++) begin
      cycle(rd(IO_FIFO_STATUS), rd(IO_FIFO_STATUS));
      for (int i = 0; i < BURST_LEN; i++) cycle(idle(), rd(IO_FIFO_DATA));
    end
    cycle(idle(), rd(IO_FIFO_DATA));
    // random traffic
    repeat (4000) begin
      automatic io_req_t p = idle(), c = idle();
      case ($urandom_range(3, 0))
        0: ;
        1: p = rd(IO_FIFO_STATUS);
        default: begin p = wr_data(next_val); next_val++; end
      endcase
      case ($urandom_range(3, 0))
        0: ;
        1: c = rd(IO_FIFO_STATUS);
        default: c = rd(IO_FIFO_DATA);
      endcase
      cycle(p, c);
    end
    checks++;
    if (n_full == 0 || n_half == 0) begin failures++; $display("FAIL full/half-full not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
