// lacg_gate: lookahead clock gate for one WIDTH-bit register.
//
// The register's clock is needed only when a write is requested (`sel`)
// and the word to be written differs from the word held (`q`). The
// decision is computed from the next data ahead of the clock edge:
//   en = sel & |(d ^ q)       (one XOR per bit, ORed over the word)
// and passed through an ICG (icg_latch) whose latch is transparent while
// `clk` is low. The gated clock `gclk` is therefore `clk_src` (the clock,
// or the register's clock pulse) when the register must change and stays
// low otherwise, including on a write of an unchanged value.
// Timing: `d`, `q` and `sel` must settle before the rising edge of `clk`;
// the decision is frozen while `clk` is high, so the register updating
// its own `q` during the pulse cannot cut the pulse short.
// In a register file `q` is the output of the register this cell clocks,
// so a linter sees a loop q -> en -> gclk -> q; it is cut by the gating
// latch, which is closed whenever the clock pulse is high.
// The XOR/OR enable follows the published description of lookahead
// gating; combining it with the write select is this design's choice.
`timescale 1ns / 1ps
module lacg_gate #(
  parameter int unsigned WIDTH = lacg_rf_pkg::DATA_W
) (
  input  logic             clk,
  input  logic             clk_src,
  input  logic             sel,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] q,
  output logic             en_latched,
  output logic             gclk
);
  logic [WIDTH-1:0] diff;
  logic             en;

  assign diff = d ^ q;
  assign en   = sel & (|diff);

  icg_latch u_icg (
    .clk        (clk),
    .en         (en),
    .clk_src    (clk_src),
    .en_latched (en_latched),
    .gclk       (gclk)
  );
endmodule
