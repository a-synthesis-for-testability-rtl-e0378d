// tb_obs_logic: exhaustive self-checking test of the observability outputs.
//
// For S(3,2) and S(5,3) every <alpha, beta> is applied and P1 is compared
// with bit alpha of beta (0 where beta has no such bit) and P2 with
// (alpha == 0). The printed response of the worked example is also checked:
// from <1,3> three alpha-steps visit <1,3>, <2,3>, <0,3> and give
// (P1,P2) = (1,0), (0,0), (1,1).
`timescale 1ns/1ps
module tb_obs_logic;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] a3, b3;
  logic       p1_3, p2_3;
  obs_logic #(.M(3), .K(2)) dut32 (.alpha(a3), .beta(b3), .p1(p1_3), .p2(p2_3));

  logic [2:0] a5, b5;
  logic       p1_5, p2_5;
  obs_logic #(.M(5), .K(3)) dut53 (.alpha(a5), .beta(b5), .p1(p1_5), .p2(p2_5));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned ex_a [3] = '{1, 2, 0};
  bit          ex_p1[3] = '{1, 0, 1};
  bit          ex_p2[3] = '{0, 0, 1};

  initial begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 4; b++) begin
        a3 = 2'(a); b3 = 2'(b);
        @(posedge clk);
        check(32'(p1_3) == ((a < 2) ? ((b >> a) & 1) : 0), $sformatf("S(3,2) P1 at <%0d,%0d>", a, b));
        check(p2_3 == (a == 0), $sformatf("S(3,2) P2 at <%0d,%0d>", a, b));
      end
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 8; b++) begin
        a5 = 3'(a); b5 = 3'(b);
        @(posedge clk);
        check(32'(p1_5) == ((a < 3) ? ((b >> a) & 1) : 0), $sformatf("S(5,3) P1 at <%0d,%0d>", a, b));
        check(p2_5 == (a == 0), $sformatf("S(5,3) P2 at <%0d,%0d>", a, b));
      end
    b3 = 2'd3;
    for (int i = 0; i < 3; i++) begin
      a3 = 2'(ex_a[i]);
      @(posedge clk);
      check(p1_3 == ex_p1[i] && p2_3 == ex_p2[i],
            $sformatf("worked example step %0d: (%0b,%0b)", i, p1_3, p2_3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
