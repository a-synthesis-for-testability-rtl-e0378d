// tb_beta_clock_gate: self-checking test of the gated beta-group clock.
//
// c is changed at random points of both clock phases. Checks:
//  - while clk is low, gclk is low;
//  - while clk is high, gclk equals the inverse of the c value present at
//    the rising edge of clk, even if c changes during the high phase (no
//    clipped or extra pulses);
//  - the number of gclk rising edges equals the number of clk rising edges
//    at which c was 0.
`timescale 1ns/1ps
module tb_beta_clock_gate;
  int checks = 0, failures = 0;
  int n_gclk = 0, n_expect = 0, n_mid_change = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic c = 1'b1;  // clock blocked until the checked cycles begin
  logic gclk;
  logic c_at_edge;

  beta_clock_gate dut (.clk(clk), .c(c), .gclk(gclk));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(posedge gclk) n_gclk++;

  initial begin
    @(posedge clk);
    @(negedge clk);
    n_gclk = 0;  // count only the edges of the checked cycles
    for (int cyc = 0; cyc < 500; cyc++) begin
      // low phase: set c at a random point, check gclk stays low
      @(negedge clk);
      #(1 + $urandom % 3);
      c = 1'($urandom % 2);
      #1 check(gclk == 1'b0, "gclk high while clk low");
      @(posedge clk);
      c_at_edge = c;
      if (!c) n_expect++;
      #1 check(gclk == !c_at_edge, $sformatf("gclk=%0b after edge with c=%0b", gclk, c_at_edge));
      // high phase: sometimes flip c, gclk must not follow
      if (($urandom % 2) != 0) begin
        #1 c = ~c;
        n_mid_change++;
      end
      #1 check(gclk == !c_at_edge, "gclk changed while clk high");
    end
    @(negedge clk);
    check(n_gclk == n_expect, $sformatf("gclk pulses %0d, expected %0d", n_gclk, n_expect));
    check(n_mid_change > 0, "c never changed during the high phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
