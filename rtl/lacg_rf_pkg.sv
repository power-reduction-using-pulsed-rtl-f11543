// lacg_rf_pkg: sizes shared by the register file blocks.
//
// The register file has four registers (R0..R3) of four bits each, a
// 2-bit destination register number and a 2-bit source select. These
// numbers are those of the published design; every module takes them as
// parameter defaults, so a wider or deeper file only needs new values here
// or parameter overrides.
`timescale 1ns / 1ps
package lacg_rf_pkg;
  localparam int unsigned DATA_W   = 4;                 // bits per register
  localparam int unsigned NUM_REGS = 4;                 // R0..R3
  localparam int unsigned SEL_W    = $clog2(NUM_REGS);  // register number width

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [SEL_W-1:0]  regnum_t;
endpackage
