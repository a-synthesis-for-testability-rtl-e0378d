// beta_clock_gate: clock of the beta flip-flop group under clock control.
//
// With C = 0 the beta group sees every rising edge of CLK (alpha-beta
// transitions); with C = 1 its clock is held low, so the beta flip-flops keep
// their value while the alpha group still advances (alpha transitions).
// This is the clock-distribution form of clock control: an enable placed in
// the clock path of the beta group, with no logic added in front of the
// flip-flops.
//
// The enable element of the original scheme is a tri-state buffer switched
// by C. A floating clock net cannot be expressed in two-state logic, so this
// design uses the standard equivalent: a latch that is transparent while CLK
// is low captures ~C, and an AND gate passes CLK only when the latched enable
// is 1. The latch is intentional (it is what keeps a change of C during the
// high phase of CLK from clipping or creating a clock pulse), so a latch
// warning on en_l is expected. C must be stable around the rising edge of
// CLK, like any synchronous input; a change of C takes effect from the next
// rising edge.
module beta_clock_gate (
  input  logic clk,
  input  logic c,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = ~c;
  end

  assign gclk = clk & en_l;

endmodule
