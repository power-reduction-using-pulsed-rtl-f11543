// quad_mux4: "quad 4:1 MUX", the read port of the register file.
//
// Selects one of N words of WIDTH bits: `y = d[sel]`, with select code 00
// choosing R0, 01 R1, 10 R2 and 11 R3 as in the published block diagram.
// Purely combinational. With the default WIDTH of 4 it is four 4:1
// multiplexers side by side, hence "quad".
`timescale 1ns / 1ps
module quad_mux4 #(
  parameter int unsigned WIDTH = lacg_rf_pkg::DATA_W,
  parameter int unsigned N     = lacg_rf_pkg::NUM_REGS
) (
  input  logic [N-1:0][WIDTH-1:0] d,
  input  logic [$clog2(N)-1:0]    sel,
  output logic [WIDTH-1:0]        y
);
  always_comb y = d[sel];
endmodule
