// tb_splitcode_step: self-checking test of the split-code successor.
//
// S(3,2): starting from <0,0>, the successor is applied twelve times through
// the module and every pair is compared with the printed twelve-entry table
// of S(3,2): (0,0) (1,1) (2,3) (0,3) (1,0) (2,2) (0,2) (1,3) (2,1) (0,1)
// (1,2) (2,0); the thirteenth pair must be <0,0> again.
// S(5,3): all 40 pairs are walked through the module; they must be distinct,
// the walk must close after exactly m*2^k = 40 steps, and m steps must
// lower beta by one with alpha unchanged. Both instances are also checked
// exhaustively against the defining recurrence written out here.
`timescale 1ns/1ps
module tb_splitcode_step;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // S(3,2)
  logic [1:0] a3, a3n;
  logic [1:0] b3, b3n;
  splitcode_step #(.M(3), .K(2)) dut32 (.alpha(a3), .beta(b3), .alpha_next(a3n), .beta_next(b3n));

  // S(5,3)
  logic [2:0] a5, a5n;
  logic [2:0] b5, b5n;
  splitcode_step #(.M(5), .K(3)) dut53 (.alpha(a5), .beta(b5), .alpha_next(a5n), .beta_next(b5n));

  int unsigned tab_a [12] = '{0, 1, 2, 0, 1, 2, 0, 1, 2, 0, 1, 2};
  int unsigned tab_b [12] = '{0, 1, 3, 3, 0, 2, 2, 3, 1, 1, 2, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned seen [40][2];
  bit          used [5][8];

  initial begin
    // Table walk for S(3,2)
    a3 = 0; b3 = 0;
    for (int j = 0; j < 12; j++) begin
      #1;
      check(32'(a3) == tab_a[j] && 32'(b3) == tab_b[j],
            $sformatf("S(3,2) index %0d: got <%0d,%0d> want <%0d,%0d>", j, a3, b3, tab_a[j], tab_b[j]));
      a3 = a3n; b3 = b3n;
      @(posedge clk);
    end
    #1 check(a3 == 0 && b3 == 0, "S(3,2) does not close after 12 steps");

    // exhaustive recurrence check, both instances
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 4; b++) begin
        a3 = 2'(a); b3 = 2'(b); #1;
        check(a3n == 2'((a + 1) % 3) && b3n == 2'((b + ((a < 2) ? (1 << a) : 0)) % 4),
              $sformatf("S(3,2) successor of <%0d,%0d> = <%0d,%0d>", a, b, a3n, b3n));
      end
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 8; b++) begin
        a5 = 3'(a); b5 = 3'(b); #1;
        check(a5n == 3'((a + 1) % 5) && b5n == 3'((b + ((a < 3) ? (1 << a) : 0)) % 8),
              $sformatf("S(5,3) successor of <%0d,%0d> = <%0d,%0d>", a, b, a5n, b5n));
      end

    // S(5,3) walk: bijection and period
    a5 = 0; b5 = 0;
    for (int j = 0; j < 40; j++) begin
      #1;
      check(!used[a5][b5], $sformatf("S(5,3) pair <%0d,%0d> repeats at index %0d", a5, b5, j));
      used[a5][b5] = 1;
      seen[j][0] = 32'(a5); seen[j][1] = 32'(b5);
      a5 = a5n; b5 = b5n;
      @(posedge clk);
    end
    #1 check(a5 == 0 && b5 == 0, "S(5,3) does not close after 40 steps");
    for (int j = 0; j + 5 < 40; j++)
      check(seen[j + 5][0] == seen[j][0] && seen[j + 5][1] == ((seen[j][1] + 7) % 8),
            $sformatf("S(5,3): M(j+m) != <alpha, beta-1> at j=%0d", j));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
