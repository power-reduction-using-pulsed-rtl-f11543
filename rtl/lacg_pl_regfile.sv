// lacg_pl_regfile: 4 x 4-bit register file with lookahead clock gating and
// pulsed-latch registers.
//
// Write port: when `load` is 1, the 2-to-4 decoder selects register
// `regnum`, which takes the word on its own data input `datain[regnum]`
// at the rising edge of `clk`. Read port: the quad 4:1 multiplexer drives
// `o` with register `ss`; all register outputs are also brought out on
// `dataout`.
//
// Clocking: instead of a clock edge each register receives a short pulse
// from a shared pulsed clock generator (one pulse per register, all
// following the rising edge of `clk` and ending well before its falling
// edge), and its bits are latches transparent during that pulse. Each
// register's pulse passes through its own lookahead clock gate, which lets
// it through only if the register is selected and at least one bit of
// `datain[i]` differs from the register's present value (XOR per bit, OR
// over the word), decided while `clk` is low and held while it is high.
// A write of an unchanged value, and every unselected register, therefore
// sees no clock activity at all. `gate_en[i]` shows the held decision and
// `gpulse[i]` the gated clock pulse that register i actually receives
// (brought out to observe clock activity; nothing needs to be connected).
//
// Timing: drive `load`, `regnum`, `datain` while `clk` is low and keep them
// until after the falling edge (the testbench changes them at the falling
// edge). Written data appear on `dataout`/`o` during the pulse after the
// rising edge, i.e. within the same cycle. `rst` (asynchronous, active
// high) clears all registers.
//
// The register count and width, the decoder, the multiplexer, the XOR
// based gating and the pulsed latches follow the published design; the
// separate load enable port, one pulse per register, the reset and the
// delay values of the pulse generator are this design's choices. The
// pulse generator is a behavioural delay model, so this top simulates
// with timing but is not synthesizable as a whole.
//
// Lint notes: each register's output feeds its own gate's XOR, whose
// decision reaches the register's latches through the gating latch, so a
// linter reports a combinational loop through lacg_gate. The loop is
// broken in time: the gating latch is closed while clk is high, which is
// the only time the pulse can open the register's latches. Verilator also
// reports the intended latches of icg_latch and pulsed_latch_reg as "no
// latch detected" once they are flattened into this top.
`timescale 1ns / 1ps
module lacg_pl_regfile
  import lacg_rf_pkg::*;
#(
  parameter int unsigned WIDTH  = DATA_W,
  parameter int unsigned NREGS  = NUM_REGS
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        load,
  input  logic [$clog2(NREGS)-1:0]    regnum,
  input  logic [NREGS-1:0][WIDTH-1:0] datain,
  input  logic [$clog2(NREGS)-1:0]    ss,
  output logic [WIDTH-1:0]            o,
  output logic [NREGS-1:0][WIDTH-1:0] dataout,
  output logic [NREGS-1:0]            gate_en,
  output logic [NREGS-1:0]            gpulse
);
  localparam int unsigned SW = $clog2(NREGS);

  logic [NREGS-1:0] wsel;    // one-hot write select
  logic [NREGS-1:0] pulse;   // ungated clock pulses

  dec2to4 #(.SEL_W(SW)) u_dec (
    .en  (load),
    .sel (regnum),
    .y   (wsel)
  );

  pulse_clock_gen #(.NUM_PULSES(NREGS)) u_pgen (
    .clk       (clk),
    .clk_pulse (pulse)
  );

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    lacg_gate #(.WIDTH(WIDTH)) u_gate (
      .clk        (clk),
      .clk_src    (pulse[i]),
      .sel        (wsel[i]),
      .d          (datain[i]),
      .q          (dataout[i]),
      .en_latched (gate_en[i]),
      .gclk       (gpulse[i])
    );

    pulsed_latch_reg #(.WIDTH(WIDTH)) u_reg (
      .rst   (rst),
      .pulse (gpulse[i]),
      .d     (datain[i]),
      .q     (dataout[i])
    );
  end

  // Timing rule of the pulsed clocking: every clock pulse must be over
  // before the falling edge of clk, when the gating latches open again.
  a_pulse_in_high_phase: assert property (@(negedge clk) pulse == '0)
    else $error("clock pulse still high at the falling edge of clk");

  quad_mux4 #(.WIDTH(WIDTH), .N(NREGS)) u_mux (
    .d   (dataout),
    .sel (ss),
    .y   (o)
  );
endmodule
