// tb_splitcode_counter_table2: split-coded counters at the sizes of the
// parameter-selection example: N = 185 states with k = 5 and
// m = max(5, ceil(185/32)) = 6, i.e. S(6,5) with 3 + 5 = 8 flip-flops, and
// the full N = m*2^k = 192 cycle of the same split-code. Each is driven and
// checked by splitcode_counter_checker (counting sequence, distinguishing
// sequence where N = m*2^k, longest distance between states in the test
// machine). The expected longest distances, 13 for N = 185 and 11 for
// N = 192, come from a separate breadth-first search over S(6,5); both lie
// within the bounds 4m-1 = 23 and 2m-1 = 11 that hold for these two cases.
`timescale 1ns/1ps
module tb_splitcode_counter_table2;
  import splitcode_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic done_a, done_b;
  int   ck_a, fl_a, ck_b, fl_b;

  splitcode_counter_checker #(.N(185), .M(6), .K(5), .STYLE(CC_MUX),  .EXP_MAX(13)) chk185 (
    .clk(clk), .start(start), .done(done_a), .checks(ck_a), .failures(fl_a));
  splitcode_counter_checker #(.N(192), .M(6), .K(5), .STYLE(CC_GATE), .EXP_MAX(11)) chk192 (
    .clk(clk), .start(start), .done(done_b), .checks(ck_b), .failures(fl_b));

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck_a + ck_b, fl_a + fl_b + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    start = 1;
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", ck_a + ck_b, fl_a + fl_b);
    $finish;
  end
endmodule
