// tb_regfile_move: the register file used with one shared data bus, as a
// datapath register file.
//
// All four data inputs are tied to one bus. The bus carries either an
// external word or the read port `o`. In the second case one cycle reads
// register `ss` and writes the word into register `regnum`, i.e. a
// register-to-register move in a single clock cycle. The testbench mixes
// external loads and moves (including moves of a register onto itself and
// moves that do not change the destination, both of which must be gated
// off) and checks every register, the read port and the number of clock
// pulses each register received against a reference model.
// Clock period 100 ns; inputs change at the falling edge.
`timescale 1ns / 1ps
module tb_regfile_move;
  localparam time TCLK = 100ns;
  localparam int  NR = 4;
  localparam longint CYCLES = 5000;

  int checks = 0, failures = 0;
  int n_load = 0, n_move = 0, n_move_gated = 0;
  int n_pulse [NR];
  int n_pulse_exp [NR];

  logic                 clk = 1'b0, rst = 1'b1, load = 1'b0, use_ext = 1'b1;
  logic [1:0]           regnum = '0, ss = '0;
  logic [3:0]           ext = '0, bus;
  logic [3:0]           o;
  logic [NR-1:0][3:0]   dataout;
  logic [NR-1:0]        gate_en, gpulse;
  logic [3:0]           ref_r [NR];

  assign bus = use_ext ? ext : o;

  lacg_pl_regfile dut (
    .clk(clk), .rst(rst), .load(load), .regnum(regnum), .datain({NR{bus}}),
    .ss(ss), .o(o), .dataout(dataout), .gate_en(gate_en), .gpulse(gpulse)
  );

  always #(TCLK / 2) clk = ~clk;

  for (genvar i = 0; i < NR; i++) begin : g_mon
    always @(posedge gpulse[i]) n_pulse[i]++;
  end

  initial begin : watchdog
    #(TCLK * (CYCLES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    logic [3:0] word;
    for (int i = 0; i < NR; i++) begin
      ref_r[i] = '0; n_pulse[i] = 0; n_pulse_exp[i] = 0;
    end
    @(negedge clk);
    rst = 1'b0;
    for (longint n = 0; n < CYCLES; n++) begin
      load    = 1'b1;
      regnum  = 2'($urandom);
      ss      = 2'($urandom);
      use_ext = ($urandom_range(0, 2) == 0);
      ext     = 4'($urandom);
      word    = use_ext ? ext : ref_r[ss];
      if (use_ext) n_load++;
      else if (word != ref_r[regnum]) n_move++;
      else n_move_gated++;
      @(posedge clk);
      if (word != ref_r[regnum]) begin
        ref_r[regnum] = word;
        n_pulse_exp[regnum]++;
      end
      #20;
      for (int i = 0; i < NR; i++) chk(dataout[i], ref_r[i], $sformatf("R%0d", i));
      chk(o, ref_r[ss], "read port");
      @(negedge clk);
    end
    for (int i = 0; i < NR; i++) begin
      checks++;
      if (n_pulse[i] != n_pulse_exp[i]) begin
        failures++;
        $display("FAIL R%0d got %0d pulses, expected %0d", i, n_pulse[i], n_pulse_exp[i]);
      end
    end
    checks++;
    if (n_load == 0 || n_move == 0 || n_move_gated == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("external loads=%0d moves=%0d moves gated off=%0d", n_load, n_move, n_move_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
