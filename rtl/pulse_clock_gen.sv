// pulse_clock_gen: delayed pulsed clock generator (behavioural model).
//
// This is a behavioural model of a delay-line circuit: it models gate and
// delay-line propagation with `#` delays and is not synthesizable logic.
//
// The generator is a chain of NUM_PULSES identical clock-pulse circuits.
// Circuit k receives a clock ck[k] (ck[0] = clk) and
//   - sends it through a delay element (T_DELAY) and an inverter (T_INV),
//     giving nb = ~ck[k] delayed by T_DELAY + T_INV;
//   - ANDs ck[k] with nb (T_AND): a high pulse that starts at each rising
//     edge of ck[k] and lasts T_DELAY + T_INV;
//   - drives that pulse through a clock buffer (T_BUF) to clk_pulse[k];
//   - re-inverts nb (T_INV) to give ck[k+1], the clock of the next
//     circuit, delayed by T_DELAY + 2*T_INV from ck[k] (the last circuit
//     has no successor and omits this inverter).
// So clk_pulse[k] rises k*(T_DELAY + 2*T_INV) + T_AND + T_BUF after each
// rising edge of clk and is T_DELAY + T_INV wide; the pulse width does
// not depend on the clock's duty cycle. The clock high phase must be
// longer than the pulse width, and the last pulse must end before the
// falling edge of clk.
// The circuit structure follows the published pulse generator figure; the
// number of circuits and all delay values are this design's choices.
`timescale 1ns / 1ps
module pulse_clock_gen #(
  parameter int unsigned NUM_PULSES = lacg_rf_pkg::NUM_REGS,
  parameter real         T_DELAY    = 1.0,   // ns, delay element
  parameter real         T_INV      = 0.1,   // ns, one inverter
  parameter real         T_AND      = 0.1,   // ns, AND gate
  parameter real         T_BUF      = 0.2    // ns, clock buffer
) (
  input  logic                  clk,
  output logic [NUM_PULSES-1:0] clk_pulse
);
  logic [NUM_PULSES-1:0] ck;     // clock entering each circuit

  assign ck[0] = clk;

  for (genvar k = 0; k < NUM_PULSES; k++) begin : g_stage
    logic dly;   // output of the delay element
    logic nb;    // inverted delayed clock
    logic pls;   // AND output before the clock buffer
    logic ckk;   // this circuit's clock

    assign ckk = ck[k];
    assign #(T_DELAY) dly          = ckk;
    assign #(T_INV)   nb           = ~dly;
    assign #(T_AND)   pls          = ckk & nb;
    assign #(T_BUF)   clk_pulse[k] = pls;
    if (k + 1 < NUM_PULSES) begin : g_next
      assign #(T_INV) ck[k+1]      = ~nb;
    end
  end
endmodule
