// clock_gate: unit-level clock gate used to switch a whole detector, or the
// parts section of a detector, off.  The enable is captured by a latch that is
// transparent while the clock is low and the latched value is ANDed with the
// clock, so the gated clock never glitches.  The gate itself is the usual
// integrated clock-gating cell; its internals are this design's choice.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch
    if (!clk) en_l = en;
  assign gclk = clk & en_l;
endmodule
