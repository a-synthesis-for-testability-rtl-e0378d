// obs_logic: observability outputs of a split-coded state.
//
//   P1 = beta_alpha   (bit number alpha of the beta value; a k-input mux
//                      addressed by alpha)
//   P2 = (alpha == 0)
// Applying m successive alpha-steps (C = 1) walks alpha through all m values
// while beta stays put, so the P1 stream spells out beta bit by bit and the
// single P2 = 1 marks where alpha was 0: together they identify the start
// state. For alpha >= k (no such beta bit) P1 is 0, as in the worked
// example where beta_2 of a 2-bit beta reads 0. Combinational; the inputs are
// the decoded alpha and beta values, not their binary codes.
module obs_logic
  import splitcode_pkg::*;
#(
  parameter int unsigned M  = 3,
  parameter int unsigned K  = 2,
  parameter int unsigned AW = alpha_width(M)
) (
  input  logic [AW-1:0] alpha,
  input  logic [K-1:0]  beta,
  output logic          p1,
  output logic          p2
);

  always_comb begin
    p1 = 1'b0;
    for (int unsigned i = 0; i < K; i++)
      if (32'(alpha) == i) p1 = beta[i];
    p2 = (alpha == '0);
  end

endmodule
