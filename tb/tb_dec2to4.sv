// tb_dec2to4: exhaustive self-check of the 2-to-4 write decoder.
// Applies every (en, sel) pair and compares y with a one-hot value built
// by shifting, independently of the decoder's code.
`timescale 1ns / 1ps
module tb_dec2to4;
  int checks = 0, failures = 0;
  logic       en;
  logic [1:0] sel;
  logic [3:0] y, exp_y;

  dec2to4 dut (.en(en), .sel(sel), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 4; s++) begin
        en = e[0]; sel = s[1:0];
        #1;
        exp_y = e[0] ? (4'b0001 << s) : 4'b0000;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL en=%0d sel=%0d y=%b expected %b", e, s, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
