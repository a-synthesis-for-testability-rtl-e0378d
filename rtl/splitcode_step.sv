// splitcode_step: successor of a split-code pair (the alpha-beta step).
//
// Given <alpha, beta> of S(m,k) it returns
//   alpha_next = alpha + 1 mod m
//   beta_next  = beta + 2^alpha mod 2^k
// which is the recurrence that defines the split-code. 2^alpha mod 2^k is
// zero for alpha >= k, so for those alpha only the alpha field moves.
// Purely combinational. An alpha value of m or more (an unused code) is
// treated like m-1 and wraps to 0; that is this design's choice.
module splitcode_step
  import splitcode_pkg::*;
#(
  parameter int unsigned M  = 3,
  parameter int unsigned K  = 2,
  parameter int unsigned AW = alpha_width(M)
) (
  input  logic [AW-1:0] alpha,
  input  logic [K-1:0]  beta,
  output logic [AW-1:0] alpha_next,
  output logic [K-1:0]  beta_next
);

  initial begin
    if (K < 1 || K > M) $error("split-code needs 0 < k <= m (k=%0d m=%0d)", K, M);
  end

  logic [K-1:0] incr;  // 2^alpha mod 2^k

  always_comb begin
    incr = '0;
    for (int unsigned i = 0; i < K; i++)
      if (32'(alpha) == i) incr[i] = 1'b1;
    beta_next  = beta + incr;
    alpha_next = (32'(alpha) >= M - 1) ? '0 : alpha + 1'b1;
  end

endmodule
