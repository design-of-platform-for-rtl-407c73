// clock_gate: integrated clock gating cell.
//
// A router sub-module that has nothing to do in a cycle need not see a clock
// edge; stopping its clock saves the clock power spent on its flip-flops. The
// cell is the usual latch-and-AND: the enable is captured by a latch that is
// transparent while the clock is low, so it cannot change while the clock is
// high and the gated clock has no glitches. gclk follows clk in every cycle
// whose enable was high before the rising edge, and stays low otherwise.
// test_en forces the clock on (scan). The latch is intended: it is the
// standard structure of a gating cell, which a standard-cell flow replaces by
// its library ICG.
//
// Clock gating of idle router parts follows the original low-power design;
// the latch-based cell itself is this design's choice (the usual glitch-free
// form). The latch is intended.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en | test_en;
  end

  assign gclk = clk & en_latched;
endmodule
