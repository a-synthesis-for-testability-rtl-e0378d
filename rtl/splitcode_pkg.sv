// splitcode_pkg: types and constant functions shared by the split-coded FSM.
//
// A split-code S(m,k) is the sequence of pairs <alpha^j, beta^j> with
// <alpha^0, beta^0> = <0,0> and
// <alpha^(j+1), beta^(j+1)> = <alpha^j + 1 mod m, beta^j + 2^alpha^j mod 2^k>.
// It visits all m*2^k pairs once before repeating. The state of an FSM is
// stored as two fields: the binary code of alpha (alpha flip-flop group,
// always clocked) and the binary code of beta (beta flip-flop group, frozen
// while the clock-control input C is 1).
//
// The value-to-code maps are this package's: ENC_BINARY stores the plain
// binary number; ENC_EXAMPLE is the assignment of the worked modulo-10 example
// (alpha 0:00 1:11 2:01, beta 0:11 1:01 2:10 3:00) and is defined for
// m = 3, k = 2 only. A code no value maps to decodes to 0 (a choice of this
// design; such codes never occur in the fault-free machine).
package splitcode_pkg;

  // How the beta group is kept from changing when C = 1.
  typedef enum logic {
    CC_MUX  = 1'b0,  // recirculating 2:1 mux in front of each beta flip-flop
    CC_GATE = 1'b1   // beta flip-flops on a gated copy of the clock
  } clk_ctrl_e;

  // Binary encoding of the alpha and beta values.
  typedef enum logic {
    ENC_BINARY  = 1'b0,
    ENC_EXAMPLE = 1'b1
  } code_enc_e;

  // Width of the alpha field: ceil(log2 m), at least one bit.
  function automatic int unsigned alpha_width(int unsigned m);
    return (m <= 2) ? 1 : $clog2(m);
  endfunction

  function automatic int unsigned alpha_enc(code_enc_e enc, int unsigned a);
    if (enc == ENC_EXAMPLE) begin
      case (a)
        0:       return 0;  // 00
        1:       return 3;  // 11
        default: return 1;  // 2 -> 01
      endcase
    end
    return a;
  endfunction

  function automatic int unsigned beta_enc(code_enc_e enc, int unsigned b);
    if (enc == ENC_EXAMPLE) begin
      case (b)
        0:       return 3;  // 11
        1:       return 1;  // 01
        2:       return 2;  // 10
        default: return 0;  // 3 -> 00
      endcase
    end
    return b;
  endfunction

  // Inverse of alpha_enc over 0..m-1; unused codes decode to 0.
  function automatic int unsigned alpha_dec(code_enc_e enc, int unsigned m, int unsigned code);
    for (int unsigned a = 0; a < m; a++)
      if (alpha_enc(enc, a) == code) return a;
    return 0;
  endfunction

  // Inverse of beta_enc over 0..2^k-1.
  function automatic int unsigned beta_dec(code_enc_e enc, int unsigned k, int unsigned code);
    for (int unsigned b = 0; b < (1 << k); b++)
      if (beta_enc(enc, b) == code) return b;
    return 0;
  endfunction

  // alpha^j of S(m,k): alpha^j = j mod m.
  function automatic int unsigned sc_alpha(int unsigned m, int unsigned j);
    return j % m;
  endfunction

  // beta^j of S(m,k), by running the recurrence j times.
  function automatic int unsigned sc_beta(int unsigned m, int unsigned k, int unsigned j);
    int unsigned a = 0;
    int unsigned b = 0;
    for (int unsigned i = 0; i < j; i++) begin
      if (a < k) b = (b + (1 << a)) % (1 << k);
      a = (a + 1) % m;
    end
    return b;
  endfunction

endpackage
