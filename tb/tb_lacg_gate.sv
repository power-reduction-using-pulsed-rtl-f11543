// tb_lacg_gate: self-check of the lookahead clock gate of one register.
// A simple model register is clocked by the gate's output. Each cycle the
// testbench chooses a select bit and next data (often equal to the held
// word), and checks that the gated clock pulses exactly when the register
// is selected and the data differ, that the register then holds the new
// word, and that updating q during the high phase does not cut the
// gated clock short.
`timescale 1ns / 1ps
module tb_lacg_gate;
  int checks = 0, failures = 0;
  int n_gated = 0, n_clocked = 0;
  logic       clk = 1'b0, sel = 1'b0;
  logic [3:0] d = '0, q = '0, ref_q = '0;
  logic       en_latched, gclk;
  logic       exp_clk;

  lacg_gate #(.WIDTH(4)) dut (
    .clk(clk), .clk_src(clk), .sel(sel), .d(d), .q(q),
    .en_latched(en_latched), .gclk(gclk)
  );

  // register under gating (edge triggered on the gated clock)
  always_ff @(posedge gclk) q <= d;

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      sel = 1'($urandom);
      d   = ($urandom_range(0, 2) == 0) ? ref_q : 4'($urandom);
      exp_clk = sel && (d != ref_q);
      #5 clk = 1'b1;
      #3;
      check({3'b0, gclk}, {3'b0, exp_clk}, "gated clock");
      check({3'b0, en_latched}, {3'b0, exp_clk}, "latched enable");
      if (exp_clk) begin
        n_clocked++;
        ref_q = d;
      end else begin
        n_gated++;
      end
      check(q, ref_q, "register after edge");
      #2 clk = 1'b0;
    end
    checks++;
    if (n_gated == 0 || n_clocked == 0) begin
      failures++;
      $display("FAIL coverage gated=%0d clocked=%0d", n_gated, n_clocked);
    end
    $display("gated=%0d clocked=%0d", n_gated, n_clocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
