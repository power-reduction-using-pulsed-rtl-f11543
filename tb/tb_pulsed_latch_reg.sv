// tb_pulsed_latch_reg: self-check of the pulsed-latch register.
// Checks that the register is transparent only while the pulse is high,
// holds while it is low even when the data change, and is cleared by
// the asynchronous reset regardless of the pulse.
`timescale 1ns / 1ps
module tb_pulsed_latch_reg;
  int checks = 0, failures = 0;
  logic       rst = 1'b1, pulse = 1'b0;
  logic [3:0] d = '0, q, ref_q;

  pulsed_latch_reg #(.WIDTH(4)) dut (.rst(rst), .pulse(pulse), .d(d), .q(q));

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: q=%h expected %h", what, $time, q, exp);
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
    d = 4'hA;
    #1 check(4'h0, "reset");
    #1 rst = 1'b0;
    #1 check(4'h0, "hold after reset");
    ref_q = '0;
    for (int n = 0; n < 200; n++) begin
      d = 4'($urandom);
      #1;
      check(ref_q, "hold while pulse low");
      if ($urandom_range(0, 1) == 1) begin
        pulse = 1'b1;
        #1 check(d, "transparent in pulse");
        d = 4'($urandom);
        #1 check(d, "follows d in pulse");
        ref_q = d;
        pulse = 1'b0;
        #1;
        d = ~d;
        #1 check(ref_q, "holds after pulse");
      end
      if ($urandom_range(0, 19) == 0) begin
        rst = 1'b1;
        pulse = 1'b1;
        #1 check(4'h0, "reset overrides pulse");
        pulse = 1'b0;
        rst = 1'b0;
        ref_q = '0;
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
