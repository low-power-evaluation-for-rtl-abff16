// tb_sync_fifo: self-checking test of sync_fifo at its default 32 x 16 size.
//
// Random pushes and pops (including attempts to push when full and pop when
// empty) are compared against a queue model: the head data, the occupancy
// count and the empty, half-full (exactly 16 items) and full flags are
// checked after every clock edge. Directed phases fill the FIFO to full and
// drain it to empty so that every flag is seen set, and a burst of 16 from
// empty must raise half_full.
module tb_sync_fifo;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned WIDTH = 16;

  logic clk = 1'b0, rst_n = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic empty, half_full, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0;
  int seen_full = 0, seen_half = 0, seen_empty = 0;

  always #5 clk = ~clk;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .half_full, .full, .count
  );

  task automatic step(input logic w, input logic r);
    wr_en   = w;
    rd_en   = r;
    wr_data = 16'($urandom);
    @(posedge clk);
    // model update with the values present at the edge
    begin
      automatic bit was_full  = (q.size() == DEPTH);
      automatic bit was_empty = (q.size() == 0);
      if (r && !was_empty) void'(q.pop_front());
      if (w && !was_full)  q.push_back(wr_data);
    end
    #1;
    check();
  endtask

  task automatic check();
    checks++;
    if (int'(count) != q.size()) begin
      failures++;
      $display("FAIL t=%0t count=%0d model=%0d", $time, count, q.size());
    end
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) ||
        half_full !== (q.size() == DEPTH/2)) begin
      failures++;
      $display("FAIL t=%0t flags e=%b h=%b f=%b size=%0d", $time, empty, half_full, full, q.size());
    end
    if (q.size() > 0) begin
      checks++;
      if (rd_data !== q[0]) begin
        failures++;
        $display("FAIL t=%0t head=%h model=%h", $time, rd_data, q[0]);
      end
    end
    if (full) seen_full++;
    if (half_full) seen_half++;
    if (empty) seen_empty++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(negedge clk);
    check();
    // burst of 16 from empty -> half full
    repeat (DEPTH/2) step(1'b1, 1'b0);
    checks++;
    if (!half_full) begin failures++; $display("FAIL not half full after 16 pushes"); end
    // fill to full and try to overflow
    repeat (DEPTH/2 + 4) step(1'b1, 1'b0);
    // push and pop together while full: pop happens, push blocked by full
    step(1'b1, 1'b1);
    // drain and try to underflow
    repeat (DEPTH + 4) step(1'b0, 1'b1);
    // random traffic
    repeat (3000) step($urandom_range(1, 0), $urandom_range(2, 0) == 0 ? 1'b1 : 1'b0);
    repeat (3000) step($urandom_range(2, 0) == 0 ? 1'b1 : 1'b0, $urandom_range(1, 0));
    checks++;
    if (seen_full == 0 || seen_half == 0 || seen_empty == 0) begin
      failures++;
      $display("FAIL flags not all exercised");
    end
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
