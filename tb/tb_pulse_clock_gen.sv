// tb_pulse_clock_gen: self-check of the delayed pulsed clock generator.
// Runs a 100 ns clock with non-default delays and records, for every
// output, when each pulse rises and falls. Each pulse must rise
// k*(T_DELAY + 2*T_INV) + T_AND + T_BUF after the clock's rising edge,
// last T_DELAY + T_INV, and there must be exactly one pulse per output
// per clock cycle. Internal nodes start at arbitrary values, so the
// outputs are only watched from the first rising clock edge on.
`timescale 1ns / 1ps
module tb_pulse_clock_gen;
  localparam int  N       = 4;
  localparam real T_DELAY = 2.0;
  localparam real T_INV   = 0.3;
  localparam real T_AND   = 0.2;
  localparam real T_BUF   = 0.4;
  localparam int  CYCLES  = 20;

  int checks = 0, failures = 0;
  logic         clk = 1'b0;
  logic [N-1:0] clk_pulse;
  realtime      t_edge;
  realtime      t_rise [N];
  int           n_pulses [N];
  bit           armed = 1'b0;    // set once start-up values have settled
  bit           seen [N];

  pulse_clock_gen #(
    .NUM_PULSES(N), .T_DELAY(T_DELAY), .T_INV(T_INV), .T_AND(T_AND), .T_BUF(T_BUF)
  ) dut (.clk(clk), .clk_pulse(clk_pulse));

  function automatic bit close(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge clk_pulse[k]) if (armed) begin
      realtime exp_t;
      exp_t = t_edge + k * (T_DELAY + 2.0 * T_INV) + T_AND + T_BUF;
      t_rise[k] = $realtime;
      seen[k] = 1'b1;
      n_pulses[k]++;
      checks++;
      if (!close($realtime, exp_t)) begin
        failures++;
        $display("FAIL pulse %0d rises at %0.3f expected %0.3f", k, $realtime, exp_t);
      end
    end
    always @(negedge clk_pulse[k]) if (armed && seen[k]) begin
      checks++;
      if (!close($realtime - t_rise[k], T_DELAY + T_INV)) begin
        failures++;
        $display("FAIL pulse %0d width %0.3f expected %0.3f", k, $realtime - t_rise[k],
                 T_DELAY + T_INV);
      end
    end
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      n_pulses[k] = 0;
      seen[k] = 1'b0;
    end
    #50;
    armed = 1'b1;
    checks++;
    if (clk_pulse !== '0) begin
      failures++;
      $display("FAIL pulses high before the first edge");
    end
    for (int c = 0; c < CYCLES; c++) begin
      t_edge = $realtime;
      clk = 1'b1;
      #50 clk = 1'b0;
      checks++;
      if (clk_pulse !== '0) begin
        failures++;
        $display("FAIL pulse still high at falling edge");
      end
      #50;
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (n_pulses[k] != CYCLES) begin
        failures++;
        $display("FAIL output %0d gave %0d pulses, expected %0d", k, n_pulses[k], CYCLES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
