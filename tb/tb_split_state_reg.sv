// tb_split_state_reg: self-checking test of the two-group state register.
//
// Two instances, one per clock-control style (recirculating mux and gated
// clock), get the same random alpha_d, beta_d and c, changed away from the
// rising clock edge. A reference model kept here loads alpha on every edge
// and beta only on edges where c = 0; both instances are compared with it
// after every edge. Asynchronous reset is applied in the middle of a cycle
// with c = 1 and must reach the reset codes at once. The test counts edges
// with c = 0 and c = 1 and requires both to have happened.
`timescale 1ns/1ps
module tb_split_state_reg;
  import splitcode_pkg::*;

  localparam int AW = 2;
  localparam int BW = 3;
  localparam logic [AW-1:0] ARST = 2'b10;
  localparam logic [BW-1:0] BRST = 3'b101;

  int checks = 0, failures = 0;
  int n_hold = 0, n_load = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          rst_n, c;
  logic [AW-1:0] ad, aq_m, aq_g, a_exp;
  logic [BW-1:0] bd, bq_m, bq_g, b_exp;

  split_state_reg #(.AW(AW), .BW(BW), .STYLE(CC_MUX), .ALPHA_RST(ARST), .BETA_RST(BRST)) dut_mux (
    .clk(clk), .rst_n(rst_n), .c(c), .alpha_d(ad), .beta_d(bd), .alpha_q(aq_m), .beta_q(bq_m));
  split_state_reg #(.AW(AW), .BW(BW), .STYLE(CC_GATE), .ALPHA_RST(ARST), .BETA_RST(BRST)) dut_gate (
    .clk(clk), .rst_n(rst_n), .c(c), .alpha_d(ad), .beta_d(bd), .alpha_q(aq_g), .beta_q(bq_g));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic compare(string when);
    check(aq_m == a_exp && bq_m == b_exp,
          $sformatf("%s mux style: <%b,%b> want <%b,%b>", when, aq_m, bq_m, a_exp, b_exp));
    check(aq_g == a_exp && bq_g == b_exp,
          $sformatf("%s gate style: <%b,%b> want <%b,%b>", when, aq_g, bq_g, a_exp, b_exp));
  endtask

  initial begin
    rst_n = 0; c = 0; ad = '0; bd = '0;
    #12;
    a_exp = ARST; b_exp = BRST;
    compare("in reset");
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      ad = AW'($urandom);
      bd = BW'($urandom);
      c  = ($urandom % 3) == 0;
      if (cyc == 200) begin
        // asynchronous reset in the middle of the low phase, with c = 1
        c = 1;
        #2 rst_n = 0;
        #1 a_exp = ARST; b_exp = BRST;
        compare("async reset");
        #1 rst_n = 1;
      end
      @(posedge clk);
      a_exp = ad;
      if (!c) begin
        b_exp = bd;
        n_load++;
      end else begin
        n_hold++;
      end
      #1 compare($sformatf("cycle %0d c=%0b", cyc, c));
    end
    check(n_hold > 0 && n_load > 0, "both clock-control modes must occur");
    $display("edges with beta loaded=%0d held=%0d", n_load, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
