// splitcode_counter: modulo-N counter synthesized for testability with a
// split-code state assignment, two-clock control and observability outputs.
//
// The counter's states S_0 .. S_(N-1) form one cycle. State S_j is assigned
// the j-th pair <alpha^j, beta^j> of the split-code S(M,K), and the pair is
// stored as the binary code of alpha (alpha flip-flop group) beside the
// binary code of beta (beta flip-flop group). Counting is then the split-code
// successor <alpha+1 mod M, beta + 2^alpha mod 2^K>, except that S_(N-1)
// returns to S_0 = <0,0> (for N = M*2^K the successor already does this).
//
// Test access:
//   c = 0  both groups load: the normal counter step S_j -> S_(j+1)
//          (alpha-beta transition).
//   c = 1  the beta group keeps its value: <alpha^j, beta^j> goes to
//          <alpha^(j+1), beta^j> (alpha transition). These extra edges cut the
//          longest distance between states from N-1 to O(M) when N = M*2^K.
//   p1 = bit alpha of beta, p2 = (alpha == 0). Holding c = 1 for M cycles
//        steps alpha once round its range with beta fixed; the M (p1,p2)
//        pairs then identify the starting state, and the register is back in
//        it afterwards (exact when N = M*2^K).
// Outputs alpha_code/beta_code are the flip-flop contents; count is the index
// j of the current state and state_valid says whether the register holds one
// of the N assigned codes (an alpha transition can lead to one of the
// M*2^K - N unused pairs when N < M*2^K). p1/p2 and count are combinational
// functions of the state (Moore), all other outputs are registers.
//
// Taken from the published scheme (Einspahr, Mehta and Seth, 1999): the
// split-code recurrence, the assignment of successive
// code pairs along the cycle, the defaults N=10, M=3, K=2 and the binary codes
// of ENC_EXAMPLE (modulo-10 example), the mux form of clock control (STYLE =
// CC_MUX) and the P1/P2 definitions. This design's own choices: the
// asynchronous reset to S_0, the count/state_valid outputs, and the next state
// of unused pairs (they follow the split-code successor, so they rejoin the
// cycle; a code word with an unused alpha code decodes as alpha = 0).
module splitcode_counter
  import splitcode_pkg::*;
#(
  parameter int unsigned N     = 10,
  parameter int unsigned M     = 3,
  parameter int unsigned K     = 2,
  parameter code_enc_e   ENC   = ENC_EXAMPLE,
  parameter clk_ctrl_e   STYLE = CC_MUX,
  localparam int unsigned AW   = alpha_width(M),
  localparam int unsigned CW   = (N <= 2) ? 1 : $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          c,
  output logic [AW-1:0] alpha_code,
  output logic [K-1:0]  beta_code,
  output logic [CW-1:0] count,
  output logic          state_valid,
  output logic          p1,
  output logic          p2
);

  if (N < 2 || N > M * (1 << K)) begin : g_bad_n
    $error("N=%0d must lie in 2 .. M*2^K=%0d", N, M * (1 << K));
  end
  if (ENC == ENC_EXAMPLE && (M != 3 || K != 2)) begin : g_bad_enc
    $error("ENC_EXAMPLE is defined for M=3, K=2 only");
  end

  // pair of the last state S_(N-1), whose successor is S_0
  localparam int unsigned LAST_A = sc_alpha(M, N - 1);
  localparam int unsigned LAST_B = sc_beta(M, K, N - 1);

  logic [AW-1:0] alpha_v, alpha_s, alpha_n, alpha_d;
  logic [K-1:0]  beta_v, beta_s, beta_n, beta_d;

  // decode the flip-flop contents into split-code values
  always_comb begin
    alpha_v = AW'(alpha_dec(ENC, M, 32'(alpha_code)));
    beta_v  = K'(beta_dec(ENC, K, 32'(beta_code)));
  end

  splitcode_step #(.M(M), .K(K)) u_step (
    .alpha      (alpha_v),
    .beta       (beta_v),
    .alpha_next (alpha_s),
    .beta_next  (beta_s)
  );

  // next state of the counter and its binary code
  always_comb begin
    if (32'(alpha_v) == LAST_A && 32'(beta_v) == LAST_B) begin
      alpha_n = '0;
      beta_n  = '0;
    end else begin
      alpha_n = alpha_s;
      beta_n  = beta_s;
    end
    alpha_d = AW'(alpha_enc(ENC, 32'(alpha_n)));
    beta_d  = K'(beta_enc(ENC, 32'(beta_n)));
  end

  split_state_reg #(
    .AW        (AW),
    .BW        (K),
    .STYLE     (STYLE),
    .ALPHA_RST (AW'(alpha_enc(ENC, 0))),
    .BETA_RST  (K'(beta_enc(ENC, 0)))
  ) u_state (
    .clk     (clk),
    .rst_n   (rst_n),
    .c       (c),
    .alpha_d (alpha_d),
    .beta_d  (beta_d),
    .alpha_q (alpha_code),
    .beta_q  (beta_code)
  );

  // index of the current state: compare with the code of every S_j
  always_comb begin
    int unsigned a, b;
    a = 0;
    b = 0;
    count       = '0;
    state_valid = 1'b0;
    for (int unsigned j = 0; j < N; j++) begin
      if (alpha_code == AW'(alpha_enc(ENC, a)) && beta_code == K'(beta_enc(ENC, b))) begin
        count       = CW'(j);
        state_valid = 1'b1;
      end
      if (a < K) b = (b + (1 << a)) % (1 << K);
      a = (a + 1) % M;
    end
  end

  obs_logic #(.M(M), .K(K)) u_obs (
    .alpha (alpha_v),
    .beta  (beta_v),
    .p1    (p1),
    .p2    (p2)
  );

endmodule
