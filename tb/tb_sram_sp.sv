// tb_sram_sp: self-checking test of the 16k x 16 single-port memory.
//
// Writes a pattern computed from the address to every word, then reads all
// words back in a different order and also mixes random reads and writes
// against a shadow array. Read data must appear one cycle after the read
// request and hold while the memory is idle or writing.
module tb_sram_sp;
  localparam int unsigned DEPTH = 16384;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0, ce = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .ce, .we, .addr, .wdata, .rdata);

  function automatic logic [WIDTH-1:0] pattern(input int a);
    return WIDTH'((a * 40503) ^ (a >> 3));
  endfunction

  task automatic write(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk);
    ce = 1'b1; we = 1'b1; addr = AW'(a); wdata = d;
    shadow[a] = d;
    @(negedge clk);
    ce = 1'b0; we = 1'b0;
  endtask

  task automatic read_check(input int a);
    logic [WIDTH-1:0] held;
    @(negedge clk);
    ce = 1'b1; we = 1'b0; addr = AW'(a);
    @(negedge clk);
    ce = 1'b0;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL read %0d: %h expected %h", a, rdata, shadow[a]);
    end
    held = rdata;
    @(negedge clk);
    checks++;
    if (rdata !== held) begin failures++; $display("FAIL rdata did not hold"); end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, pattern(a));
    for (int a = DEPTH - 1; a >= 0; a -= 7) read_check(a);
    repeat (3000) begin
      automatic int a = $urandom_range(DEPTH - 1, 0);
      if ($urandom_range(1, 0) != 0) write(a, 16'($urandom));
      else read_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
