// icg_latch: integrated clock gate, a D latch followed by an AND gate.
//
// The latch is transparent while `clk` is low and holds `en` while `clk` is
// high, so the enable seen by the AND gate cannot change during the high
// phase and the gated output carries no glitch or truncated pulse:
//   en_latched follows en while clk == 0, holds while clk == 1
//   gclk = clk_src & en_latched
// For the plain clock gate of the published figure tie `clk_src` to `clk`.
// In the pulsed-latch register file `clk_src` is a short clock pulse that
// starts at the rising edge of `clk` and ends before its falling edge; the
// separate input is this design's addition so that the same cell can gate
// such a pulse.
// The level-sensitive latch is intended: it is what makes this cell a
// glitch-free clock gate.
`timescale 1ns / 1ps
module icg_latch (
  input  logic clk,
  input  logic en,
  input  logic clk_src,
  output logic en_latched,
  output logic gclk
);
  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk_src & en_latched;
endmodule
