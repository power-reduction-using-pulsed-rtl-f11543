// pulsed_latch_reg: one register of the file, built from pulsed latches.
//
// Each bit is a level-sensitive latch that is transparent while `pulse` is
// high and holds otherwise. Driven by a short pulse that follows the rising
// clock edge, the register behaves like an edge-triggered register but
// needs one latch per bit instead of a master-slave pair. `d` must be
// stable for the whole pulse. An asynchronous active-high `rst` clears the
// register and overrides the pulse.
// Replacing the flip-flops by pulsed latches follows the published design;
// the reset is this design's choice. The latches are intended.
`timescale 1ns / 1ps
module pulsed_latch_reg #(
  parameter int unsigned WIDTH = lacg_rf_pkg::DATA_W
) (
  input  logic             rst,
  input  logic             pulse,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch begin
    if (rst)        q = '0;
    else if (pulse) q = d;
  end
endmodule
