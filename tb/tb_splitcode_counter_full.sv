// tb_splitcode_counter_full: the split-coded counter exactly as delivered
// (modulo-10, S(3,2), example codes, mux clock control, no parameter
// overrides), taken through complete operation.
//
//  1. Two full counting cycles from reset with C = 0: the register must show
//     the printed codes S0..S9 = 0011 1101 0100 0000 1111 0110 0010 1100
//     0101 0001 and wrap from S9 to S0.
//  2. From every state, one clock with C = 1: the result must be the pair
//     <alpha of the next pair, beta of this pair> of the twelve-entry S(3,2)
//     table, and from there C = 0 must lead back into the cycle.
//  3. The worked unit-step path from S6 <0,2> to S4 <1,0>: steps
//     alpha-beta, alpha, alpha, alpha-beta through <1,3>, <2,3>, <0,3>.
//  4. 2000 cycles of random C with occasional resets against the same table
//     model, checking codes, count, state_valid, P1 and P2 every cycle.
// Transitions of each kind (normal, alpha with a new edge, alpha self-loop,
// wrap, entry into an unused pair) are counted and must all occur.
`timescale 1ns/1ps
module tb_splitcode_counter_full;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rst_n = 1'b0, c = 1'b0;
  logic [1:0] ac, bc;
  logic [3:0] cnt;
  logic       val, p1, p2;

  splitcode_counter dut (
    .clk(clk), .rst_n(rst_n), .c(c), .alpha_code(ac), .beta_code(bc),
    .count(cnt), .state_valid(val), .p1(p1), .p2(p2));

  int unsigned pa [12] = '{0, 1, 2, 0, 1, 2, 0, 1, 2, 0, 1, 2};
  int unsigned pb [12] = '{0, 1, 3, 3, 0, 2, 2, 3, 1, 1, 2, 0};
  logic [3:0] fig_code [10] = '{4'b0011, 4'b1101, 4'b0100, 4'b0000, 4'b1111,
                                4'b0110, 4'b0010, 4'b1100, 4'b0101, 4'b0001};
  logic [1:0] a_code [3] = '{2'b00, 2'b11, 2'b01};
  logic [1:0] b_code [4] = '{2'b11, 2'b01, 2'b10, 2'b00};

  int m;  // model: index into the S(3,2) table
  int n_ab = 0, n_alpha_new = 0, n_alpha_loop = 0, n_wrap = 0, n_unused = 0;

  function automatic int pair_index(int unsigned a, int unsigned b);
    for (int i = 0; i < 12; i++) if (pa[i] == a && pb[i] == b) return i;
    return -1;
  endfunction

  function automatic int model_next(int idx, bit cv);
    int nx = (idx == 9) ? 0 : (idx + 1) % 12;
    if (!cv) return nx;
    return pair_index(pa[nx], pb[idx]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic compare(string when);
    logic [3:0] e = (m < 10) ? fig_code[m] : {a_code[pa[m]], b_code[pb[m]]};
    check({ac, bc} == e, $sformatf("%s: code %b%b want %b (index %0d)", when, ac, bc, e, m));
    check(val == (m < 10) && (m >= 10 || 32'(cnt) == m),
          $sformatf("%s: count %0d valid %0b, index %0d", when, cnt, val, m));
    check(p1 == ((pa[m] < 2) ? pb[m][pa[m]] : 1'b0) && p2 == (pa[m] == 0),
          $sformatf("%s: P1/P2 %0b%0b at index %0d", when, p1, p2, m));
  endtask

  task automatic do_reset();
    @(posedge clk);
    #1 rst_n = 0;
    #2 rst_n = 1;
    m = 0;
    #1 compare("after reset");
  endtask

  task automatic step(bit cv);
    int nm;
    @(negedge clk);
    c = cv;
    @(posedge clk);
    nm = model_next(m, cv);
    if (!cv) n_ab++;
    else if (nm == m) n_alpha_loop++;
    else if (nm != model_next(m, 1'b0)) n_alpha_new++;
    if (!cv && m == 9) n_wrap++;
    if (nm >= 10 && m < 10) n_unused++;
    m = nm;
    #1 compare($sformatf("after step c=%0b", cv));
  endtask

  initial begin
    m = 0;
    do_reset();
    // 1. counting
    for (int i = 0; i < 20; i++) step(1'b0);
    check(m == 0 && cnt == 0, "not back in S0 after two cycles");
    // 2. one alpha step from every state
    for (int s = 0; s < 10; s++) begin
      do_reset();
      for (int i = 0; i < s; i++) step(1'b0);
      step(1'b1);
      for (int i = 0; i < 3; i++) step(1'b0);
    end
    // 3. printed unit-step path S6 -> S7 -> S2 -> S3 -> S4
    do_reset();
    for (int i = 0; i < 6; i++) step(1'b0);
    step(1'b0);
    check({ac, bc} == 4'b1100, "unit-step path: <1,3> not reached");
    step(1'b1);
    check({ac, bc} == 4'b0100, "unit-step path: <2,3> not reached");
    step(1'b1);
    check({ac, bc} == 4'b0000, "unit-step path: <0,3> not reached");
    step(1'b0);
    check({ac, bc} == 4'b1111 && cnt == 4, "unit-step path: S4 <1,0> not reached");
    // 4. random operation
    do_reset();
    for (int cyc = 0; cyc < 2000; cyc++) begin
      step(1'(($urandom % 3) == 0));
      if (($urandom % 400) == 0) do_reset();
    end
    $display("normal=%0d alpha(new edge)=%0d alpha self-loop=%0d wrap=%0d unused-pair entries=%0d",
             n_ab, n_alpha_new, n_alpha_loop, n_wrap, n_unused);
    check(n_ab > 0 && n_alpha_new > 0 && n_alpha_loop > 0 && n_wrap > 0 && n_unused > 0,
          "a transition kind never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
