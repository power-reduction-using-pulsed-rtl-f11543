// dec2to4: 2-to-4 line decoder with enable, the write-port decoder of the
// register file.
//
// When the load enable `en` is 1, output bit `sel` of `y` is 1 and all
// others are 0; when `en` is 0 all outputs are 0, so no register is
// selected for writing. Output i drives the write select of register Ri.
// Purely combinational, no clock. The decoder and its load enable follow
// the published block diagram; SEL_W generalises it to 2^SEL_W outputs.
`timescale 1ns / 1ps
module dec2to4 #(
  parameter int unsigned SEL_W = lacg_rf_pkg::SEL_W
) (
  input  logic                 en,
  input  logic [SEL_W-1:0]     sel,
  output logic [2**SEL_W-1:0]  y
);
  always_comb begin
    y = '0;
    if (en) y[sel] = 1'b1;
  end
endmodule
