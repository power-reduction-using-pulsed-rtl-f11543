// tb_quad_mux4: self-check of the quad 4:1 read multiplexer.
// Drives random words on the four inputs and every select code, and
// compares y with the input chosen by a case statement of its own.
`timescale 1ns / 1ps
module tb_quad_mux4;
  int checks = 0, failures = 0;
  logic [3:0][3:0] d;
  logic [1:0]      sel;
  logic [3:0]      y, exp_y;

  quad_mux4 dut (.d(d), .sel(sel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      d   = 16'($urandom);
      sel = 2'($urandom);
      #1;
      case (sel)
        2'b00: exp_y = d[0][3:0];
        2'b01: exp_y = d[1][3:0];
        2'b10: exp_y = d[2][3:0];
        default: exp_y = d[3][3:0];
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%0d d=%h y=%h expected %h", sel, d, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
