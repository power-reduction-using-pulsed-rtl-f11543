# Low-power register file: lookahead clock gating with pulsed latches

A small register file — four registers of four bits — built to use as little
clock power as possible. Two techniques are combined:

* **Lookahead clock gating (LACG).** A register gets a clock only if it will
  actually change. Before each clock edge, every register compares the word
  it is about to store with the word it holds (one XOR per bit, ORed over
  the word). It only accepts a clock if it is the selected write target and
  the two words differ. An unselected register, an idle cycle and a write of
  an unchanged value all cause no clock activity at all.
* **Pulsed latches.** The registers are built from plain latches that open
  during a short clock pulse just after the rising clock edge. A master-slave
  flip-flop needs two latches per bit; this needs one. The pulses come from a
  chain of clock-pulse circuits, each made of a delay line, two inverters and
  an AND gate.

Functionally the design is an ordinary register file. One write per cycle
goes to the register picked by a 2-to-4 decoder, and a quad 4:1 multiplexer
reads any register. All four register contents are also visible at all times.

## Structure

```
            load, regnum ──► dec2to4 ──► wsel[3:0]
                                            │
 clk ──► pulse_clock_gen ──► pulse[3:0]     │
   │                            │           │
   │      ┌─────────── for each register i ─┼──────────────────────┐
   │      │  lacg_gate                      ▼                      │
   └──────┼─► icg_latch ◄── en = wsel[i] & |(datain[i] ^ dataout[i])│
          │      │ gpulse[i] = pulse[i] & en_latched               │
          │      ▼                                                 │
          │  pulsed_latch_reg  (datain[i] ─► dataout[i])           │
          └────────────────────────────────────────────────────────┘
                   dataout[3:0] ──► quad_mux4 (ss) ──► o
```

| File | Role |
|---|---|
| `rtl/lacg_rf_pkg.sv` | sizes: `DATA_W = 4`, `NUM_REGS = 4`, `SEL_W = 2` |
| `rtl/dec2to4.sv` | write decoder with load enable |
| `rtl/quad_mux4.sv` | read multiplexer, code 00→R0 … 11→R3 |
| `rtl/icg_latch.sv` | clock gate: latch open while `clk` is low, then AND |
| `rtl/lacg_gate.sv` | XOR/OR lookahead enable plus clock gate, for one register |
| `rtl/pulse_clock_gen.sv` | chain of clock-pulse circuits (**behavioural delay model**) |
| `rtl/pulsed_latch_reg.sv` | one register of latches, open during its pulse, async reset |
| `rtl/lacg_pl_regfile.sv` | top level |

### Top-level ports (`lacg_pl_regfile`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | asynchronous reset, active high, clears all registers |
| `load` | in | 1 | write enable |
| `regnum` | in | 2 | register to write |
| `datain` | in | 4×4 | one data word per register; `datain[i]` is written into Ri |
| `ss` | in | 2 | register to read |
| `o` | out | 4 | read port, contents of register `ss` |
| `dataout` | out | 4×4 | contents of every register |
| `gate_en` | out | 4 | the held gating decision of each register |
| `gpulse` | out | 4 | the gated clock pulse each register really receives |

`gate_en` and `gpulse` are there so you can observe the clock activity the
design saves. They need not be connected.

Each register has its own data input, as in a file where every register is
fed from its own source. For the classic single-bus file, drive all four
`datain` words with the same value.

## Clocking and timing: how the gating stays glitch-free

This is the part that takes the most care. One cycle, with the default
delays (in ns; the clock period can be anything comfortably longer than
the pulse chain, the testbench uses 100 ns):

```
clk        ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________/‾‾‾
inputs     ==X=======================================X=====   change while clk is low
en_latched  follows en  |  frozen while clk high   | follows en
pulse[0]       _/‾‾‾\____________________________________       rises +0.3, 1.1 wide
pulse[1]            _/‾‾‾\_______________________________       +1.2 later
pulse[2]                 _/‾‾‾\__________________________
pulse[3]                      _/‾‾‾\_____________________       ends about 5.0 after the edge
gpulse[i]   = pulse[i] only if en_latched[i]
```

1. While `clk` is low, each gate's latch is open and `en_latched[i]` follows
   `wsel[i] & |(datain[i] ^ dataout[i])`. The write request and data must
   settle in this phase.
2. At the rising edge the latch closes, which freezes the decision for the
   whole high phase.
3. Shortly after the edge, the pulse generator sends one pulse per register.
   If the frozen decision is 1, the pulse reaches the register's latches
   and they load `datain[i]`.
4. The register's output now equals its input, so its own enable drops to 0.
   But the gating latch is closed, so the pulse is not cut short. This is why
   the enable must pass through a latch rather than drive the AND gate
   directly.
5. Every pulse must be over before `clk` falls and the gating latches open
   again. The top checks this with an assertion
   (`a_pulse_in_high_phase`). With the default delays the last pulse ends
   about 5 ns after the rising edge.

As a result, a write appears on `dataout` and `o` a few nanoseconds after the
rising edge of the cycle in which it was requested. For this to work,
`datain` must also be held for the whole pulse, which is why inputs should
change only while `clk` is low.

### The pulse generator

Each clock-pulse circuit takes a clock `ck` and passes it through a delay
element and an inverter. An AND gate combines `ck` with that inverted
delayed copy, which gives a pulse `T_DELAY + T_INV` wide at each rising edge.
A clock buffer then drives the pulse out. A second inverter restores the
delayed clock, and that restored clock is the next circuit's input. So pulse
`k` rises `k·(T_DELAY + 2·T_INV) + T_AND + T_BUF` after the clock edge.

The delays are parameters (`T_DELAY = 1.0`, `T_INV = 0.1`, `T_AND = 0.1`,
`T_BUF = 0.2` ns). Their values are placeholders, not figures from any
process. Register *i* uses pulse *i*. Because the registers do not feed one
another, the staggering between pulses has no functional effect here. It does
spread out the moments at which the registers switch.

This block describes a delay line, so it is **not synthesizable**. It is a
timing model written with `#` delays. In an ASIC it would be a custom or
library pulse generator. In synthesis tools that ignore delays, the AND of a
clock with its own inverse becomes constant 0.

## What is the reference design and what is added here

Taken from the reference design:
* four 4-bit registers;
* a 2-to-4 write decoder with load enable, and a quad 4:1 read mux with codes 00–11;
* the latch + AND clock gate, with the latch open while the clock is low;
* an XOR-per-bit, OR-over-word gating condition;
* registers made of latches clocked by pulses instead of flip-flops;
* the structure of the clock-pulse circuit and its chaining.

Choices made in this RTL:
* the gating condition is ANDed with the decoder's write select;
* one data input per register, where a classic register file has a single input bus;
* one pulse-generator stage per register;
* all delay values;
* asynchronous active-high reset;
* the `gate_en` and `gpulse` observation outputs.

Not included: the variants that this design is usually compared against.
These are flip-flop registers with the same lookahead gating, data-driven
gating (one shared clock gate per group of flip-flops) and merged multi-bit
flip-flops. Power figures cannot be obtained from RTL simulation. What the
RTL does give is the clock activity power depends on: `gpulse` shows every
pulse that reaches a register.

## Simulating

The blocks need `--timing`, because the pulse generator uses delays. From the
project root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/lacg_rf_pkg.sv tb/tb_lacg_pl_regfile.sv --top-module tb_lacg_pl_regfile
./obj_dir/Vtb_lacg_pl_regfile
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Every one
also has a watchdog that counts a failure and stops if the simulation runs
too long.

| Testbench | What it checks |
|---|---|
| `tb_dec2to4` | all 8 input combinations against a shifted one-hot |
| `tb_quad_mux4` | 200 random words and selects |
| `tb_icg_latch` | enable held through the high phase even when it changes; no output while `clk` is low |
| `tb_lacg_gate` | gated clock only when selected and data differ; the clocked register ends up right |
| `tb_pulse_clock_gen` | the rise time and width of every pulse; one pulse per output per cycle; all pulses low at the falling edge (non-default delays) |
| `tb_pulsed_latch_reg` | transparent only during the pulse; holds otherwise; reset overrides the pulse |
| `tb_lacg_pl_regfile` | whole design at default size (details below) |
| `tb_regfile_move` | shared-bus use: all `datain` tied to one bus, which carries either an external word or `o`; covers external loads, one-cycle register-to-register moves and moves gated off, checking registers, read port and pulse counts (5,000 cycles) |

The top-level testbench works through three phases:

1. It writes 1100, 1101, 1011 and 1111 into R0..R3 and reads them back.
2. It writes the same words again; every pulse must be gated off.
3. It runs 20,000 random cycles with frequent repeated words, idle cycles
   and occasional resets.

A reference model predicts every register, the read port and every gating
decision. The pulses on `gpulse` must equal, one for one, the writes that
change a register. The testbench also counts how often each mechanism
happened, and fails if any never did:

* clocked writes;
* writes gated off for unchanged data;
* idle cycles;
* resets;
* reads through each mux input.

One run takes well under a second.

## Lint notes

* Each register's output feeds its own gate's XOR, whose result reaches the
  register's latches again. Verilator therefore reports a combinational loop
  (`UNOPTFLAT`) through `lacg_gate`. The loop is cut in time: the gating
  latch is closed whenever a pulse can open the register's latches.
* Once `icg_latch` and `pulsed_latch_reg` are flattened into the top,
  Verilator says it detects no latch in their `always_latch` blocks
  (`NOLATCH`). Both are deliberate latches. Each module on its own lints
  cleanly.

## Changing it

* **Width / depth:** set `WIDTH` and `NREGS` on `lacg_pl_regfile`, or
  change `lacg_rf_pkg`. The decoder and mux follow `$clog2(NREGS)`. Keep
  `NREGS · (T_DELAY + 2·T_INV) + T_AND + T_BUF` well below half the clock
  period, or the assertion will fire.
* **Shared data bus:** tie the four `datain` words together outside.
* **Pulse width:** change `T_DELAY`. Be careful with hold times on `datain`,
  which must stay stable until the pulse ends.
