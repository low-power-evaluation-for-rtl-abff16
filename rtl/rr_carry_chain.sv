// rr_carry_chain: combinational round-robin grant logic.
//
// A priority token (one-hot `prio`) enters the chain at the contender that
// currently has the highest priority. Each stage either grants (it requests
// and holds the token or an incoming carry) or passes the carry on to the
// next higher index. A ring of such stages would be a combinational loop, so
// the chain is unrolled twice: the first copy takes the priority token, the
// second copy receives only the carry that wrapped past the last contender.
// The grant of contender i is the OR of its stage in both copies.
// At most one bit of `gnt` is set; it is zero when no contender requests.
// Purely combinational; the carry travels at most 2*N-1 stages.
module rr_carry_chain #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0] req,
  input  logic [N-1:0] prio,
  output logic [N-1:0] gnt
);

  logic [2*N:0]   carry;
  logic [2*N-1:0] g2;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < 2*N; i++) begin : g_stage
    // the priority token enters only in the first copy of the chain
    logic hold;
    assign hold       = carry[i] | ((i < N) ? prio[i % N] : 1'b0);
    assign g2[i]      =  req[i % N] & hold;
    assign carry[i+1] = ~req[i % N] & hold;
  end

  assign gnt = g2[N-1:0] | g2[2*N-1:N];

endmodule
