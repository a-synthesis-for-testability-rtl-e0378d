// tb_splitcode_counter: end-to-end test of the split-coded counter.
//
// Three instances:
//   dut   - all defaults: modulo-10, S(3,2), example binary codes, mux clock
//           control.
//   dut_g - same, gated-clock control. Gets the same inputs as dut and must
//           match it on every cycle.
//   dut12 - modulo-12 with S(3,2) (N = m*2^k), plain binary codes, gated
//           clock control: the case in which every alpha step stays inside
//           the counter's states and m alpha steps form a distinguishing
//           sequence.
// Reference: the twelve pairs of S(3,2) and the ten printed state codes of
// the modulo-10 example (S0 0011, S1 1101, S2 0100, S3 0000, S4 1111,
// S5 0110, S6 0010, S7 1100, S8 0101, S9 0001) are tables here. The model
// steps an index into the pair table: c = 0 goes to the next index (S_(N-1)
// wraps to S_0), c = 1 takes alpha from that next pair and keeps beta.
//
// Phases:
//  1. 3000 cycles of random c with occasional resets; all outputs compared
//     with the model every cycle.
//  2. Distinguishing sequence on dut12: from every state, three cycles with
//     c = 1; the state is recovered from the (P1,P2) responses alone
//     (alpha = (m - j) mod m where P2 = 1 at step j; response t carries bit
//     (alpha + t) mod m of beta) and must be back in the start state.
//  3. The test-machine graph is explored through the outputs of each
//     instance, and the shortest distances between counter states are
//     computed: normal machine (c = 0 only) and test machine (both values
//     of c, unused code pairs allowed on the way). Expected values were
//     computed separately by breadth-first search over the split-code pairs:
//       modulo-10: normal max 9, sum 450; test max 6, sum 263 (over N*N
//                  ordered pairs, distance to itself 0)
//       modulo-12: normal max 11, sum 792; test max 5, sum 384
// Every mechanism (both transition kinds, alpha self-loop, wrap, entry to an
// unused pair, distinguishing sequence) is counted and must occur.
`timescale 1ns/1ps
module tb_splitcode_counter;
  import splitcode_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instances ----
  logic       rst_a_n, c_a, rst_b_n, c_b;
  logic [1:0] ac, bc, ac_g, bc_g, ac12, bc12;
  logic [3:0] cnt, cnt_g, cnt12;
  logic       val, val_g, val12, p1, p2, p1_g, p2_g, p1_12, p2_12;

  splitcode_counter dut (
    .clk(clk), .rst_n(rst_a_n), .c(c_a), .alpha_code(ac), .beta_code(bc),
    .count(cnt), .state_valid(val), .p1(p1), .p2(p2));
  splitcode_counter #(.STYLE(CC_GATE)) dut_g (
    .clk(clk), .rst_n(rst_a_n), .c(c_a), .alpha_code(ac_g), .beta_code(bc_g),
    .count(cnt_g), .state_valid(val_g), .p1(p1_g), .p2(p2_g));
  splitcode_counter #(.N(12), .M(3), .K(2), .ENC(ENC_BINARY), .STYLE(CC_GATE)) dut12 (
    .clk(clk), .rst_n(rst_b_n), .c(c_b), .alpha_code(ac12), .beta_code(bc12),
    .count(cnt12), .state_valid(val12), .p1(p1_12), .p2(p2_12));

  // ---- reference tables ----
  int unsigned pa [12] = '{0, 1, 2, 0, 1, 2, 0, 1, 2, 0, 1, 2};
  int unsigned pb [12] = '{0, 1, 3, 3, 0, 2, 2, 3, 1, 1, 2, 0};
  logic [3:0] fig_code [10] = '{4'b0011, 4'b1101, 4'b0100, 4'b0000, 4'b1111,
                                4'b0110, 4'b0010, 4'b1100, 4'b0101, 4'b0001};
  logic [1:0] a_code [3] = '{2'b00, 2'b11, 2'b01};
  logic [1:0] b_code [4] = '{2'b11, 2'b01, 2'b10, 2'b00};

  function automatic int pair_index(int unsigned a, int unsigned b);
    for (int i = 0; i < 12; i++) if (pa[i] == a && pb[i] == b) return i;
    return -1;
  endfunction

  function automatic int model_next(int idx, int n, bit c);
    int nx = (idx == n - 1) ? 0 : (idx + 1) % 12;
    if (!c) return nx;
    return pair_index(pa[nx], pb[idx]);
  endfunction

  // ---- mechanism counters ----
  int n_ab = 0, n_alpha_new = 0, n_alpha_loop = 0, n_wrap = 0, n_unused = 0, n_ds = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int ma, mb;  // model indices of the modulo-10 and modulo-12 instances

  task automatic compare_all(string when);
    logic [3:0] exp10;
    exp10 = (ma < 10) ? fig_code[ma] : {a_code[pa[ma]], b_code[pb[ma]]};
    check({ac, bc} == exp10, $sformatf("%s: mod-10 code %b%b want %b (index %0d)", when, ac, bc, exp10, ma));
    check(val == (ma < 10) && (ma >= 10 || 32'(cnt) == ma),
          $sformatf("%s: mod-10 count %0d valid %0b, index %0d", when, cnt, val, ma));
    check(p1 == ((pa[ma] < 2) ? pb[ma][pa[ma]] : 1'b0) && p2 == (pa[ma] == 0),
          $sformatf("%s: mod-10 P1/P2 %0b%0b at index %0d", when, p1, p2, ma));
    check({ac_g, bc_g, cnt_g, val_g, p1_g, p2_g} == {ac, bc, cnt, val, p1, p2},
          $sformatf("%s: gated-clock instance differs from mux instance", when));
    check(32'(ac12) == pa[mb] && 32'(bc12) == pb[mb] && val12 && 32'(cnt12) == mb,
          $sformatf("%s: mod-12 state <%0d,%0d> count %0d, index %0d", when, ac12, bc12, cnt12, mb));
    check(p1_12 == ((pa[mb] < 2) ? pb[mb][pa[mb]] : 1'b0) && p2_12 == (pa[mb] == 0),
          $sformatf("%s: mod-12 P1/P2 at index %0d", when, mb));
  endtask

  // one clock with given controls, model follows
  task automatic step(bit ca, bit cb);
    int nma, nmb;
    @(negedge clk);
    c_a = ca; c_b = cb;
    @(posedge clk);
    nma = model_next(ma, 10, ca);
    nmb = model_next(mb, 12, cb);
    if (!ca) n_ab++;
    else if (nma == ma) n_alpha_loop++;
    else if (nma != model_next(ma, 10, 1'b0)) n_alpha_new++;
    if (!ca && ma == 9) n_wrap++;
    if (nma >= 10 && ma < 10) n_unused++;
    ma = nma; mb = nmb;
    #1;
  endtask

  // reset pulse inside the high phase, so that no clock edge follows it
  // before the next step()
  task automatic reset_all();
    @(posedge clk);
    #1 rst_a_n = 0; rst_b_n = 0;
    #2 rst_a_n = 1; rst_b_n = 1;
    ma = 0; mb = 0;
    #1 compare_all("after reset");
  endtask

  // ---- graph exploration through the outputs of one instance ----
  // sel 0: modulo-10 instance (node = 4-bit code), sel 1: modulo-12
  int         adj [2][16][2];     // successor node for c = 0 / 1
  bit         seen [2][16];
  bit         isstate [2][16];
  bit         path [2][16][$];    // c values that lead from reset to node

  function automatic int node_of(int sel);
    return (sel == 0) ? int'({ac, bc}) : int'({ac12, bc12});
  endfunction

  task automatic goto_node(int sel, bit p[$]);
    @(posedge clk);
    #1;
    if (sel == 0) rst_a_n = 0; else rst_b_n = 0;
    #2 rst_a_n = 1; rst_b_n = 1;
    foreach (p[i]) begin
      @(negedge clk);
      if (sel == 0) c_a = p[i]; else c_b = p[i];
      @(posedge clk);
      #1;
    end
  endtask

  task automatic explore(int sel);
    int q[$];
    int root, nd;
    bit p[$];
    goto_node(sel, p);
    root = node_of(sel);
    seen[sel][root] = 1;
    isstate[sel][root] = (sel == 0) ? val : val12;
    q.push_back(root);
    while (q.size() > 0) begin
      nd = q.pop_front();
      for (int cv = 0; cv < 2; cv++) begin
        int nx;
        goto_node(sel, path[sel][nd]);
        @(negedge clk);
        if (sel == 0) c_a = 1'(cv); else c_b = 1'(cv);
        @(posedge clk);
        #1;
        nx = node_of(sel);
        adj[sel][nd][cv] = nx;
        if (!seen[sel][nx]) begin
          seen[sel][nx] = 1;
          isstate[sel][nx] = (sel == 0) ? val : val12;
          path[sel][nx] = path[sel][nd];
          path[sel][nx].push_back(1'(cv));
          q.push_back(nx);
        end
      end
    end
  endtask

  task automatic distances(int sel, bit test_mode, output int mx, output int sum, output int nstates);
    mx = 0; sum = 0; nstates = 0;
    for (int s = 0; s < 16; s++) begin
      int d[16];
      int q[$];
      if (!isstate[sel][s]) continue;
      nstates++;
      foreach (d[i]) d[i] = -1;
      d[s] = 0;
      q.push_back(s);
      while (q.size() > 0) begin
        int u = q.pop_front();
        for (int cv = 0; cv <= int'(test_mode); cv++) begin
          int v = adj[sel][u][cv];
          if (d[v] < 0) begin
            d[v] = d[u] + 1;
            q.push_back(v);
          end
        end
      end
      for (int t = 0; t < 16; t++) begin
        if (!isstate[sel][t]) continue;
        if (d[t] < 0) begin
          mx = 1000;
        end else begin
          sum += d[t];
          if (d[t] > mx) mx = d[t];
        end
      end
    end
  endtask

  initial begin
    int mx, sum, ns;
    rst_a_n = 0; rst_b_n = 0; c_a = 0; c_b = 0;
    ma = 0; mb = 0;
    reset_all();

    // 1. random operation, the first 40 cycles counting only
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit ca, cb;
      ca = (cyc >= 40) && (($urandom % 3) == 0);
      cb = (cyc >= 40) && (($urandom % 3) == 0);
      step(ca, cb);
      compare_all($sformatf("cycle %0d", cyc));
      if (($urandom % 500) == 0) reset_all();
    end

    // 2. distinguishing sequence on the modulo-12 instance, from every state
    for (int s = 0; s < 12; s++) begin
      bit r1[3], r2[3];
      int j, alpha_id, beta_id;
      reset_all();
      for (int i = 0; i < s; i++) step(1'b0, 1'b0);
      j = -1;
      for (int t = 0; t < 3; t++) begin
        r1[t] = p1_12; r2[t] = p2_12;
        if (p2_12 && j < 0) j = t;
        step(1'b0, 1'b1);
        compare_all("distinguishing sequence");
      end
      alpha_id = (3 - j) % 3;
      beta_id = 0;
      for (int t = 0; t < 3; t++)
        if ((alpha_id + t) % 3 < 2) beta_id |= int'(r1[t]) << ((alpha_id + t) % 3);
      check(j >= 0 && alpha_id == int'(pa[s]) && beta_id == int'(pb[s]),
            $sformatf("DS from S%0d identified <%0d,%0d>, want <%0d,%0d>", s, alpha_id, beta_id, pa[s], pb[s]));
      check(32'(cnt12) == s && val12, $sformatf("DS from S%0d did not return to it", s));
      if (j >= 0 && alpha_id == int'(pa[s]) && beta_id == int'(pb[s])) n_ds++;
    end

    // 3. distances in the normal and the test machine
    explore(0);
    explore(1);
    distances(0, 1'b0, mx, sum, ns);
    check(ns == 10 && mx == 9 && sum == 450, $sformatf("mod-10 normal machine: %0d states max %0d sum %0d", ns, mx, sum));
    $display("mod-10 normal machine: max %0d average %0.3f", mx, real'(sum) / 100.0);
    distances(0, 1'b1, mx, sum, ns);
    check(mx == 6 && sum == 263, $sformatf("mod-10 test machine: max %0d sum %0d", mx, sum));
    $display("mod-10 test machine:   max %0d average %0.3f", mx, real'(sum) / 100.0);
    distances(1, 1'b0, mx, sum, ns);
    check(ns == 12 && mx == 11 && sum == 792, $sformatf("mod-12 normal machine: %0d states max %0d sum %0d", ns, mx, sum));
    $display("mod-12 normal machine: max %0d average %0.3f", mx, real'(sum) / 144.0);
    distances(1, 1'b1, mx, sum, ns);
    check(mx == 5 && sum == 384, $sformatf("mod-12 test machine: max %0d sum %0d", mx, sum));
    $display("mod-12 test machine:   max %0d average %0.3f", mx, real'(sum) / 144.0);

    $display("mechanisms: ab-transitions=%0d alpha-transitions(new edge)=%0d alpha self-loops=%0d wraps=%0d unused-pair entries=%0d DS identifications=%0d",
             n_ab, n_alpha_new, n_alpha_loop, n_wrap, n_unused, n_ds);
    check(n_ab > 0, "no alpha-beta transition");
    check(n_alpha_new > 0, "no alpha transition giving a new edge");
    check(n_alpha_loop > 0, "no alpha self-loop");
    check(n_wrap > 0, "no wrap from S9 to S0");
    check(n_unused > 0, "no entry into an unused code pair");
    check(n_ds == 12, "distinguishing sequence did not identify all 12 states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
