// splitcode_counter_checker: drives and checks one splitcode_counter
// instance of any size (testbench helper).
//
// After start rises it runs, on its own instance:
//  1. counting: N+5 cycles with c = 0 from reset; every state code must equal
//     the pair <alpha^j, beta^j> of S(M,K) computed here from the defining
//     recurrence (plain binary codes), count must equal j, and S_(N-1) must
//     wrap to S_0;
//  2. if N = M*2^K, the distinguishing sequence (M cycles with c = 1) from
//     every state: the start pair is recovered from (P1,P2) alone and the
//     counter must be back in the start state;
//  3. the test-machine graph is explored through the state outputs, and the
//     longest shortest path between counter states, using only transitions
//     that stay inside the counter's states, must equal EXP_MAX and must not
//     exceed 4M-1 (2M-1 when N = M*2^K).
// It then raises done; checks and failures hold its counts.
`timescale 1ns/1ps
module splitcode_counter_checker
  import splitcode_pkg::*;
#(
  parameter int unsigned N       = 10,
  parameter int unsigned M       = 3,
  parameter int unsigned K       = 2,
  parameter clk_ctrl_e   STYLE   = CC_MUX,
  parameter int          EXP_MAX = 7
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned AW = alpha_width(M);
  localparam int unsigned CW = (N <= 2) ? 1 : $clog2(N);
  localparam int unsigned NW = AW + K;
  localparam int unsigned L  = M << K;
  localparam bit IDEAL = (N == L);

  logic          rst_n = 1'b0;
  logic          c = 1'b0;
  logic [AW-1:0] ac;
  logic [K-1:0]  bc;
  logic [CW-1:0] cnt;
  logic          val, p1, p2;

  splitcode_counter #(.N(N), .M(M), .K(K), .ENC(ENC_BINARY), .STYLE(STYLE)) dut (
    .clk(clk), .rst_n(rst_n), .c(c), .alpha_code(ac), .beta_code(bc),
    .count(cnt), .state_valid(val), .p1(p1), .p2(p2));

  int unsigned ea [L];
  int unsigned eb [L];

  initial begin
    automatic int unsigned a = 0, b = 0;
    for (int j = 0; j < int'(L); j++) begin
      ea[j] = a; eb[j] = b;
      if (a < K) b = (b + (1 << a)) % (1 << K);
      a = (a + 1) % M;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (N=%0d) @%0t: %s", N, $time, what);
    end
  endtask

  task automatic do_reset();
    @(posedge clk);
    #1 rst_n = 0;
    #2 rst_n = 1;
    #1;
  endtask

  task automatic step(bit cv);
    @(negedge clk);
    c = cv;
    @(posedge clk);
    #1;
  endtask

  // graph over the NW-bit state codes
  int adj  [1 << NW][2];
  bit seen [1 << NW];
  bit isst [1 << NW];
  bit path [1 << NW][$];

  task automatic goto_node(bit p[$]);
    do_reset();
    foreach (p[i]) step(p[i]);
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    wait (start);

    // 1. counting
    do_reset();
    for (int j = 0; j < int'(N) + 5; j++) begin
      automatic int e = j % int'(N);
      check(32'(ac) == ea[e] && 32'(bc) == eb[e] && 32'(cnt) == e && val,
            $sformatf("count step %0d: <%0d,%0d> count %0d, want <%0d,%0d>", j, ac, bc, cnt, ea[e], eb[e]));
      step(1'b0);
    end

    // 2. distinguishing sequence
    if (IDEAL) begin
      for (int s = 0; s < int'(N); s++) begin
        bit r1 [M];
        int jp, al, be;
        do_reset();
        for (int i = 0; i < s; i++) step(1'b0);
        jp = -1;
        for (int t = 0; t < int'(M); t++) begin
          r1[t] = p1;
          if (p2 && jp < 0) jp = t;
          step(1'b1);
        end
        al = (int'(M) - jp) % int'(M);
        be = 0;
        for (int t = 0; t < int'(M); t++)
          if ((al + t) % int'(M) < int'(K)) be |= int'(r1[t]) << ((al + t) % int'(M));
        check(jp >= 0 && al == int'(ea[s]) && be == int'(eb[s]),
              $sformatf("DS from S%0d gave <%0d,%0d>, want <%0d,%0d>", s, al, be, ea[s], eb[s]));
        check(32'(cnt) == s && val, $sformatf("DS from S%0d did not return", s));
      end
    end

    // 3. exploration and distances
    begin
      int q[$];
      int root, nd, mx;
      bit p[$];
      goto_node(p);
      root = int'({ac, bc});
      seen[root] = 1;
      isst[root] = val;
      q.push_back(root);
      while (q.size() > 0) begin
        nd = q.pop_front();
        for (int cv = 0; cv < 2; cv++) begin
          int nx;
          goto_node(path[nd]);
          step(1'(cv));
          nx = int'({ac, bc});
          adj[nd][cv] = nx;
          if (!seen[nx]) begin
            seen[nx] = 1;
            isst[nx] = val;
            path[nx] = path[nd];
            path[nx].push_back(1'(cv));
            q.push_back(nx);
          end
        end
      end
      mx = 0;
      for (int s = 0; s < (1 << NW); s++) begin
        int d [1 << NW];
        int bq[$];
        if (!isst[s]) continue;
        foreach (d[i]) d[i] = -1;
        d[s] = 0;
        bq.push_back(s);
        while (bq.size() > 0) begin
          automatic int u = bq.pop_front();
          for (int cv = 0; cv < 2; cv++) begin
            automatic int v = adj[u][cv];
            if (isst[v] && d[v] < 0) begin
              d[v] = d[u] + 1;
              bq.push_back(v);
            end
          end
        end
        for (int t = 0; t < (1 << NW); t++)
          if (isst[t]) mx = (d[t] < 0) ? 100000 : ((d[t] > mx) ? d[t] : mx);
      end
      $display("N=%0d S(%0d,%0d): longest shortest path between counter states %0d", N, M, K, mx);
      check(mx == EXP_MAX, $sformatf("longest distance %0d, expected %0d", mx, EXP_MAX));
      check(mx <= (IDEAL ? 2 * int'(M) - 1 : 4 * int'(M) - 1), "distance bound exceeded");
    end
    done = 1;
  end
endmodule
