// tb_lacg_pl_regfile: end-to-end self-check of the register file with
// lookahead clock gating and pulsed latches, at its default size
// (4 registers x 4 bits).
//
// Clock period 100 ns. Inputs change at the falling edge; results are
// checked 20 ns after the rising edge, when every clock pulse is over.
// A reference model (an array of four words) predicts each register, the
// read port and the gating decision of every register. The gated pulses
// the design reports on `gpulse` are counted and must equal the number of
// writes that change a register: a write of an unchanged value, an
// unselected register and a cycle without load must produce no pulse.
//
// Phases:
//  1. reset, then the sequence of the published simulation: registers
//     0..3 loaded with 1100, 1101, 1011, 1111 and read back in turn;
//  2. the same words written again (every pulse must be gated off);
//  3. random traffic with frequent repeated words, idle cycles and an
//     occasional asynchronous reset.
// Mechanisms counted: clocked writes, writes gated for unchanged data,
// cycles without load, resets, reads through each mux input.
`timescale 1ns / 1ps
module tb_lacg_pl_regfile;
  localparam int    NR = 4;
  localparam int    W  = 4;
  localparam time   TCLK = 100ns;
  localparam longint RANDOM_CYCLES = 20000;

  int checks = 0, failures = 0;
  int n_write = 0, n_gated_same = 0, n_idle = 0, n_reset = 0;
  int n_read [NR];
  int n_pulse [NR];       // gated pulses seen inside the design
  int n_pulse_exp [NR];   // gated pulses predicted by the model

  logic                 clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [1:0]           regnum = '0, ss = '0;
  logic [NR-1:0][W-1:0] datain = '0;
  logic [W-1:0]         o;
  logic [NR-1:0][W-1:0] dataout;
  logic [NR-1:0]        gate_en;
  logic [NR-1:0]        gpulse;

  logic [W-1:0]  ref_r [NR];
  logic [NR-1:0] exp_en;

  lacg_pl_regfile dut (
    .clk(clk), .rst(rst), .load(load), .regnum(regnum), .datain(datain),
    .ss(ss), .o(o), .dataout(dataout), .gate_en(gate_en),
    .gpulse(gpulse)
  );

  always #(TCLK / 2) clk = ~clk;

  for (genvar i = 0; i < NR; i++) begin : g_mon
    always @(posedge gpulse[i]) n_pulse[i]++;
  end

  initial begin : watchdog
    #(TCLK * (RANDOM_CYCLES + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // Apply one cycle: inputs are set now (clock low), the model is updated
  // for the coming rising edge, and the design is checked after it.
  task automatic cycle(input logic ld, input logic [1:0] rn,
                       input logic [NR-1:0][W-1:0] din, input logic [1:0] rs);
    load = ld; regnum = rn; datain = din; ss = rs;
    exp_en = '0;
    if (ld && din[rn] != ref_r[rn]) exp_en[rn] = 1'b1;
    if (!ld) n_idle++;
    else if (exp_en[rn]) n_write++;
    else n_gated_same++;
    @(posedge clk);
    for (int i = 0; i < NR; i++) if (exp_en[i]) begin
      ref_r[i] = din[i];
      n_pulse_exp[i]++;
    end
    #20;
    for (int i = 0; i < NR; i++) begin
      chk(dataout[i], ref_r[i], $sformatf("dataout[%0d]", i));
    end
    chk(o, ref_r[rs], "o (read port)");
    chk({{(W-NR){1'b0}}, gate_en}, {{(W-NR){1'b0}}, exp_en}, "gate_en");
    n_read[rs]++;
    @(negedge clk);
  endtask

  task automatic do_reset();
    rst = 1'b1;
    #10;
    for (int i = 0; i < NR; i++) ref_r[i] = '0;
    for (int i = 0; i < NR; i++) chk(dataout[i], '0, "dataout in reset");
    rst = 1'b0;
    n_reset++;
  endtask

  logic [NR-1:0][W-1:0] fig;
  logic [NR-1:0][W-1:0] rnd;

  initial begin
    for (int i = 0; i < NR; i++) begin
      n_read[i] = 0; n_pulse[i] = 0; n_pulse_exp[i] = 0; ref_r[i] = '0;
    end
    @(negedge clk);
    do_reset();

    // phase 1: the published sequence
    fig[0] = 4'b1100; fig[1] = 4'b1101; fig[2] = 4'b1011; fig[3] = 4'b1111;
    for (int r = 0; r < NR; r++) cycle(1'b1, 2'(r), fig, 2'(r));
    for (int r = 0; r < NR; r++) cycle(1'b0, 2'(r), fig, 2'(r));
    for (int r = 0; r < NR; r++) chk(dataout[r], fig[r], "published sequence");

    // phase 2: rewrite the same words: all gated
    for (int r = 0; r < NR; r++) cycle(1'b1, 2'(r), fig, 2'(3 - r));

    // phase 3: random traffic
    for (longint n = 0; n < RANDOM_CYCLES; n++) begin
      rnd = (NR * W)'({$urandom, $urandom});
      for (int i = 0; i < NR; i++)
        if ($urandom_range(0, 2) == 0) rnd[i] = ref_r[i];
      cycle($urandom_range(0, 4) != 0, 2'($urandom), rnd, 2'($urandom));
      if ($urandom_range(0, 199) == 0) do_reset();
    end

    for (int i = 0; i < NR; i++) begin
      checks++;
      if (n_pulse[i] != n_pulse_exp[i]) begin
        failures++;
        $display("FAIL register %0d: %0d gated pulses, expected %0d", i, n_pulse[i],
                 n_pulse_exp[i]);
      end
    end

    // every mechanism must have happened
    checks++;
    if (n_write == 0 || n_gated_same == 0 || n_idle == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL coverage");
    end
    for (int i = 0; i < NR; i++) begin
      checks++;
      if (n_read[i] == 0) begin
        failures++;
        $display("FAIL read port input %0d never used", i);
      end
    end
    $display("clocked writes=%0d gated writes (same data)=%0d idle cycles=%0d resets=%0d",
             n_write, n_gated_same, n_idle, n_reset);
    $display("reads per register: %0d %0d %0d %0d", n_read[0], n_read[1], n_read[2], n_read[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
