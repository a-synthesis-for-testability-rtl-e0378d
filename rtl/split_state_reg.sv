// split_state_reg: state register of a two-clock FSM.
//
// The flip-flops are split into two fixed groups. The alpha group is loaded
// from alpha_d on every rising edge of clk. The beta group is loaded from
// beta_d only while the clock-control input c is 0; with c = 1 it keeps its
// value. So from state <a1,b1> with next state <a2,b2> the register goes to
// <a2,b2> when c = 0 (alpha-beta transition) and to <a2,b1> when c = 1
// (alpha transition).
//
// STYLE selects how the beta group is held:
//   CC_MUX  (default) a 2:1 mux in front of each beta flip-flop with c as
//           select: 0 steers beta_d in, 1 recirculates the flip-flop output.
//           The clock tree is left alone.
//   CC_GATE the beta flip-flops are clocked by beta_clock_gate, which blocks
//           the clock while c = 1.
// Both styles reset asynchronously (rst_n low) to ALPHA_RST / BETA_RST,
// whatever c is; the reset is this design's addition. Outputs change one
// clock edge after the inputs are sampled; there is no combinational path
// from input to output.
module split_state_reg
  import splitcode_pkg::*;
#(
  parameter int unsigned        AW        = 2,
  parameter int unsigned        BW        = 2,
  parameter clk_ctrl_e          STYLE     = CC_MUX,
  parameter logic [AW-1:0]      ALPHA_RST = '0,
  parameter logic [BW-1:0]      BETA_RST  = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          c,
  input  logic [AW-1:0] alpha_d,
  input  logic [BW-1:0] beta_d,
  output logic [AW-1:0] alpha_q,
  output logic [BW-1:0] beta_q
);

  // alpha group: clock always active
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) alpha_q <= ALPHA_RST;
    else        alpha_q <= alpha_d;
  end

  if (STYLE == CC_MUX) begin : g_mux
    logic [BW-1:0] beta_mux;
    assign beta_mux = c ? beta_q : beta_d;  // 1: recirculate, 0: new state

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) beta_q <= BETA_RST;
      else        beta_q <= beta_mux;
    end
  end else begin : g_gate
    logic beta_clk;

    beta_clock_gate u_cg (
      .clk  (clk),
      .c    (c),
      .gclk (beta_clk)
    );

    always_ff @(posedge beta_clk or negedge rst_n) begin
      if (!rst_n) beta_q <= BETA_RST;
      else        beta_q <= beta_d;
    end
  end

endmodule
