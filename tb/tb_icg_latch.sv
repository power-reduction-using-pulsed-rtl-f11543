// tb_icg_latch: self-check of the latch + AND clock gate.
// Used as the plain clock gate (clk_src = clk). Each cycle a random enable
// is applied while the clock is low; halfway through the high phase the
// enable is flipped, which must have no effect. The gated clock is sampled
// in the high phase, after the flip, and in the low phase, and compared
// with the enable that was present at the rising edge.
`timescale 1ns / 1ps
module tb_icg_latch;
  int checks = 0, failures = 0;
  logic clk = 1'b0, en = 1'b0;
  logic en_latched, gclk;
  logic exp_en;

  icg_latch dut (.clk(clk), .en(en), .clk_src(clk), .en_latched(en_latched), .gclk(gclk));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      en = 1'($urandom);          // clock low: enable settles
      #5;
      exp_en = en;
      check(en_latched, exp_en, "transparent while clk low");
      check(gclk, 1'b0, "gclk low while clk low");
      #5 clk = 1'b1;              // rising edge
      #2;
      check(gclk, exp_en, "gclk in high phase");
      en = ~en;                   // enable changes while clk high
      #2;
      check(gclk, exp_en, "gclk after enable change in high phase");
      check(en_latched, exp_en, "latch holds while clk high");
      #1 clk = 1'b0;
      #1;
      check(gclk, 1'b0, "gclk low after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
