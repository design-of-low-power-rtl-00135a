# 8-bit barrel shifter with pulsed-latch select lines

A barrel shifter rotates a data word by any number of places in one pass
through combinational logic, not one place per clock as a shift register
would. This design is an 8-bit rotate-right barrel shifter. The three lines
that choose the rotate amount are captured by **pulsed latches**. A pulsed
latch is a single level-sensitive latch whose clock pin gets a short pulse
after each clock edge. It behaves like an edge-triggered register, but it has
half the storage stages of a master-slave flip-flop and fewer transistors on
the clock. That saving is the point of the design: lower power.

The design follows the circuit published as *Design of Low Power Barrel
Shifter using Pulsed Latches* (Surya A.). The section "Where this RTL
departs from the source" lists what comes from that description and what
was chosen here.

The source builds the shifter in two multiplexer styles, and both are here:

| module                   | datapath                                    | cells                               |
|--------------------------|---------------------------------------------|-------------------------------------|
| `barrel_shifter_pl_mux2` | 3 cascaded stages of 2:1 multiplexers (main design) | 24 `mux2` + 3 `pulsed_latch` |
| `barrel_shifter_pl_mux8` | one level of 8:1 multiplexers               | 8 `mux8` + 3 `pulsed_latch`         |
| `shift_rotate_unit`      | general shifter with a 3-bit opcode         | combinational                       |

`barrel_shifter_top` puts the three side by side. Each has its own ports.

## The rotate network and its select lines

The select lines keep the names of the original schematic, **S0, S1 and S2**.
Their weights run the opposite way to what the indices suggest:

| line | stage  | rotates right by |
|------|--------|------------------|
| S2   | first  | 1                |
| S1   | second | 2                |
| S0   | third  | 4                |

So the rotate amount is the binary number **S0 S1 S2**, and setting S2 and S0
rotates by five. In the RTL the select port is a vector `s` with `s[k]` = Sk.
Code that computes a shift amount `n` must therefore drive
`s = {n[0], n[1], n[2]}`, which is the bit-reversed `n`. It must not drive
`s = n`.

Each stage is a row of 2:1 multiplexers, one per bit:

* select **0** (mux input 0): the bit passes straight through;
* select **1** (mux input 1): output bit *i* takes input bit *(i + 2^j) mod 8*.
  Here *j* is the stage number, so the stages move bits by 1, 2 and 4 places.

Moving bit *i+1* down to position *i* rotates right. The bit leaving the LSB
end comes back in at the MSB. The stages are cascaded, so their rotations
add. The network uses n·log2(n) = 24 multiplexers. Reference values for data
`00001111`:

| S0 S1 S2 | amount | Q[7:0]   |
|----------|--------|----------|
| 000      | 0      | 00001111 |
| 001      | 1      | 10000111 |
| 010      | 2      | 11000011 |
| 011      | 3      | 11100001 |
| 100      | 4      | 11110000 |
| 101      | 5      | 01111000 |
| 110      | 6      | 00111100 |
| 111      | 7      | 00011110 |

`barrel_core_mux2` takes a `WIDTH` parameter, which must be a power of two.
It then has log2(WIDTH) stages, and the stage driven by Sk rotates by
2^(STAGES-1-k).

`barrel_core_mux8` does the same 8-bit rotation in one level. The 8:1
multiplexer for output bit *i* has input *Ij* wired to data bit
*(i + j) mod 8*. Its select is the rotate amount `{S0, S1, S2}`. Both
shifters therefore give identical outputs for identical inputs, and the
testbenches check this.

## The pulsed latch

`pulsed_latch` = `pulse_gen` → `level_latch`.

* `level_latch` is a plain D latch: transparent while its clock pin is high,
  holding while it is low.
* `pulse_gen` produces a pulse `cp`, `TPW` wide (default 1 ns), after every
  rising edge of `clk`. The pulse width does not depend on the clock's duty
  cycle.

So the latch opens for `TPW` after each rising edge and is opaque for the
rest of the cycle. From outside it looks like a register that samples at the
rising edge. The differences are what make pulsed-latch timing special:

* **Transparency inside the pulse.** If `d` changes during the pulse, the
  change passes straight to `q`. `d` must therefore stay stable for the pulse
  width after the edge, so the effective hold time grows by `TPW`. The fastest
  logic path into the latch must satisfy
  t_cd > t_hold − t_ccq + t_pw.
* **Time borrowing.** Data may arrive a little after the edge, while the latch
  is still open. The cycle time must satisfy
  T_c > max(t_pcq + t_pd, t_pcq + t_pd + t_setup − t_pw).

The RTL has zero delays, so these constraints are not modelled. The
testbenches only show that a change inside the pulse passes through and that
one after it does not.

**`pulse_gen` is a behavioural model, not synthesizable logic.** It forms the
pulse as `clk AND NOT (clk delayed by TPW)`, using a continuous assignment
with a delay. Synthesis drops delays, so the pulse becomes the constant 0, and
the select latches and everything behind them fold to constants. An
implementation needs a library pulse-generator or pulsed-latch cell, or a
delay line marked don't-touch, in place of `pulse_gen`.

## Interface and timing of the shifters

`barrel_shifter_pl_mux2 #(WIDTH = 8, TPW = 1.0ns)` and
`barrel_shifter_pl_mux8 #(TPW = 1.0ns)`:

| port  | dir | width       | meaning                                          |
|-------|-----|-------------|--------------------------------------------------|
| `clk` | in  | 1           | clock of the three select latches                |
| `d`   | in  | WIDTH       | data D                                           |
| `s`   | in  | log2(WIDTH) | select lines, `s[k]` = Sk (see weights above)    |
| `q`   | out | WIDTH       | D rotated right by the latched amount            |

* Only the select lines are latched. The path D → Q is combinational: a data
  change appears on Q at once, rotated by the amount captured at the last
  clock edge.
* A select code changed at any time outside the pulse has no effect until the
  next rising edge. It is taken during the pulse and Q is final before the
  pulse ends, so the shift completes within the cycle in which the code is
  taken.
* There is no reset. Until the first rising edge the latched select lines
  hold arbitrary values.

`barrel_shifter_top #(WIDTH = 8, TPW = 1.0ns)` has one shared `clk` and three
port groups: `m2_d/m2_s/m2_q` for the 2:1-multiplexer shifter,
`m8_d/m8_s/m8_q` for the 8:1 shifter (always 8 bits), and
`su_a/su_amt/su_op/su_f` for the shift/rotate unit.

## The shift/rotate unit

`shift_rotate_unit #(WIDTH = 8)` implements a 3-bit opcode
`{left, rotate, arith}`. The opcode type is `barrel_pkg::shift_op_t`:

| left | rotate | arith | operation                 |
|------|--------|-------|---------------------------|
| 0    | 0      | 0     | shift right logical       |
| 0    | 0      | 1     | shift right arithmetic (sign bit copied in) |
| 0    | 1      | x     | rotate right              |
| 1    | 0      | 0     | shift left logical        |
| 1    | 0      | 1     | shift left arithmetic (same as logical)     |
| 1    | 1      | x     | rotate left               |

`amt` is a binary shift amount, 0 to WIDTH−1. The unit doubles the operand:
`{fill, a}` for right shifts or `{a, fill}` for left shifts, where `fill` is
zeros, sign copies or `a` itself for rotates. One shift of the doubled word
then gives every operation. At `WIDTH = 4` it is the classic 4-bit rotation
unit with an L/R control: a one-place left rotation of a3a2a1a0 gives
a2a1a0a3, and a one-place right rotation gives a0a3a2a1.

## Files

Everything is in `rtl/`, one module or package per file:

* `barrel_pkg.sv`: the `shift_op_t` opcode type.
* `mux2.sv`, `mux8.sv`: the multiplexer cells.
* `level_latch.sv`, `pulse_gen.sv`, `pulsed_latch.sv`: the storage element.
* `barrel_core_mux2.sv`, `barrel_core_mux8.sv`: the combinational rotate
  networks.
* `barrel_shifter_pl_mux2.sv`, `barrel_shifter_pl_mux8.sv`: the shifters
  with pulsed-latch selects.
* `shift_rotate_unit.sv`: the opcode-controlled shifter.
* `barrel_shifter_top.sv`: all of the above side by side.

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each
testbench compares the module against a reference written independently
(for example a bit-by-bit rotate loop). The 8-bit networks and the opcode
unit are checked exhaustively. Every testbench ends with a line
`TB_RESULT checks=N failures=M`. It also has a watchdog that fails the run if
it hangs.

* `tb_barrel_shifter_top` runs the whole top at its default parameters for
  400 cycles. It checks both shifters against the reference and against each
  other. It counts each mechanism and fails if one never occurs: select
  captured at an edge, select held between edges, data passing through
  without a clock, select changed inside the pulse, every rotate amount, and
  every opcode of the shift/rotate unit.
* `tb_workload_truth_table` replays the eight rows of the table above through
  the top, one shift per clock cycle.

## Simulating

Verilator 5 with timing support is needed, because `pulse_gen` uses delays.
From the directory holding `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/barrel_pkg.sv tb/tb_barrel_shifter_top.sv \
    --top-module tb_barrel_shifter_top -o sim
./obj_dir/sim
```

Any other testbench works the same way: put its file and top-module name in
place of `tb_barrel_shifter_top`. Verilator finds the modules it uses through
`-Irtl`. All files declare `timeunit 1ns; timeprecision 10ps;`.

A lint run (`verilator --lint-only -Wall rtl/barrel_pkg.sv rtl/<file>.sv`) is
clean except for a `NOLATCH` warning on `level_latch`. Verilator reports it
when the latch is instantiated in a generate loop. The block is a latch and
synthesis infers one.

## Where this RTL departs from the source

Taken from the source description:

* the three-stage 2:1-multiplexer rotate network, including the stage order
  and the weights S2 = 1, S1 = 2, S0 = 4;
* the truth table for data 00001111;
* one pulsed latch per select line, clocked from the clock, feeding the stage
  selects, with the data path left unlatched;
* the pulsed latch built as a pulse generator driving a level latch;
* the 8:1-multiplexer variant (eight 8:1 muxes with latched selects);
* the 2:1 and 8:1 multiplexer truth tables;
* the shift/rotate opcode table.

Chosen here:

* **Wiring direction of the rotating inputs.** The prose speaks of connections
  to the "next lower" input. The truth table needs bit *i* to take bit *i+1*,
  and the RTL follows the truth table.
* **Tap wiring of the 8:1 variant.** It is not legible in the published
  schematic. It was chosen so that the 8:1 shifter computes the same function
  as the 2:1 one.
* **Clocking.** A single shared clock drives all select latches. The
  published layout appears to give each latch its own clock pin.
* **Pulse generator.** Its circuit and the pulse width are not given. The
  AND-with-delayed-clock model and `TPW = 1 ns` are assumptions, and the
  rising edge is taken as the active edge.
* **Shift amount of the opcode unit.** It is a binary number. Shift left
  arithmetic is taken to equal shift left logical.
* **Widths.** `WIDTH` generalises the 2:1 network and the opcode unit to any
  power of two. The 8:1 shifter stays 8-bit.
* **Reset.** There is none.

Not reproduced:

* The power and area figures that motivate the design: 0.69 µW against
  1.85 µW for the 2:1 version, 0.32 µW against 0.35 µW for the 8:1 version,
  and fewer clocked transistors. These are transistor-level results and RTL
  cannot show them.
* The published timing diagram. Its output traces are not mapped to Q7..Q0,
  so the testbenches check against the rotate function and the truth table
  instead.
