// arb_contenders: random request generator for N arbiter contenders.
//
// Each contender follows the load model used to characterise the arbiters:
// it raises its request after a random wait, holds it until it sees its
// grant, then waits a random 0..max_wait cycles (0 = full load, it asks again
// in the very cycle it is granted) before raising it again. Requests change
// on the falling clock edge, so the arbiter always sees stable inputs at the
// rising edge and a granted contender's new request is visible in the cycle
// of its grant. `max_wait` may change at any time to move between loads.
module arb_contenders #(
  parameter int unsigned N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int unsigned  max_wait,
  input  logic [N-1:0] gnt,
  output logic [N-1:0] req
);

  int unsigned waitc [N];

  initial begin
    req = '0;
    foreach (waitc[i]) waitc[i] = 0;
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      req <= '0;
      foreach (waitc[i]) waitc[i] <= $urandom_range(max_wait, 0);
    end else begin
      for (int i = 0; i < N; i++) begin
        if (req[i]) begin
          if (gnt[i]) begin
            automatic int unsigned w = $urandom_range(max_wait, 0);
            if (w != 0) begin
              req[i]   <= 1'b0;
              waitc[i] <= w - 1;
            end
          end
        end else if (waitc[i] == 0) begin
          req[i] <= 1'b1;
        end else begin
          waitc[i] <= waitc[i] - 1;
        end
      end
    end
  end

endmodule
