# 5-line to 32-line decoder from 74AC11138-style 3:8 decoders

A 5-to-32 decoder takes a 5-bit address and pulls exactly one of 32 output
lines low. It is the kind of part that sits in front of a bank of memory chips,
where each output line drives one chip select, or that routes a data bit onto
one of 32 lines. This RTL builds the decoder from a single building block: a
3-line to 8-line decoder with the pins and function of the 74AC11138 (a
'138-type part). Several '138s are put together in a tree. The same building
block also gives a 4-to-16 decoder.

Everything here is combinational logic. Nothing has a clock, a reset or any
state. The modules are written at gate level, following a transistor-level
CMOS implementation: an inverter, a 3-input AND and a 4-input NAND cell, then
the '138, then the larger decoders.

## The building block: `ac11138`

| pin (package) | port    | role                                      |
|---------------|---------|-------------------------------------------|
| 15, 14, 13    | a, b, c | select code, value `c*4 + b*2 + a`        |
| 11            | g1      | enable, active high                       |
| 10            | g2a_n   | enable, active low                        |
| 9             | g2b_n   | enable, active low                        |
| 16,1,2,3,5,6,7,8 | y_n[0..7] | outputs, active low                  |

Inside there are five inverters: one for each select bit and one for each
active-low enable. A 3-input AND combines `g1`, `~g2a_n` and `~g2b_n` into one
internal enable. Eight 4-input NANDs each take that enable and the true or
inverted form of a, b and c. When the part is enabled, output `y_n[{c,b,a}]` is
0 and all others are 1. When it is disabled, all eight outputs are 1.

The three enable pins are the key to cascading. Together they form a small
AND gate with one non-inverting and two inverting inputs, and that gate is
free. Feeding a data bit into an enable pin turns the part into a
demultiplexer: the bit appears on the selected line, inverted if it enters
through `g1` and true if it enters through `g2a_n` or `g2b_n`.

## Two ways to reach 32 lines

All four 5:32 variants below use the same address map. Bits a2..a0 choose a
line within a bank of eight. Bits a4..a3 choose the bank:

| a4 a3 | bank | outputs  |
|-------|------|----------|
| 0 0   | 0    | 0 .. 7   |
| 0 1   | 1    | 8 .. 15  |
| 1 0   | 2    | 16 .. 23 |
| 1 1   | 3    | 24 .. 31 |

### Decoder tree (`dec5to32`, the main design)

This version uses five '138s and four inverters.

* **First stage.** A first '138 has all three enables tied active. It gets a3
  on A, a4 on B, and C tied low. Its outputs Y0..Y3 are the four active-low
  bank selects. Y4..Y7 can never go low and are unused.
* **Bank decoders.** Each bank select goes straight to both active-low
  enables of one bank decoder. It also goes through an inverter to that
  decoder's `g1`.
* **Output.** All four bank decoders decode a2..a0. Bank k drives
  `y_n[8k+7:8k]`.

Driving all three enables from one signal is redundant, since any one of them
would do. It is kept because it makes every bank decoder wired the same way.
A side effect matters for testing: a fault on one enable connection of a bank
decoder cannot be seen at the outputs.

The worst-case path starts at a3 or a4. It runs through the first decoder,
then a bank-select inverter, then the enable path of a bank decoder. That is
two decoder delays plus one inverter.

### Enable-decoded (`dec5to32_fig3`)

This version uses four '138s and one inverter. There is no first stage.
Each decoder's three enables decode a4 and a3 directly:

| decoder | g1  | g2a_n | g2b_n | enabled for a4 a3 |
|---------|-----|-------|-------|-------------------|
| 0       | 1   | a3    | a4    | 0 0               |
| 1       | a3  | a4    | 0     | 0 1               |
| 2       | a4  | a3    | 0     | 1 0               |
| 3       | a3  | ~a4   | 0     | 1 1               |

This version is one decoder delay deep, plus the inverter on the a4 path of
decoder 3. It is therefore faster and smaller than the tree. The tree scales
more regularly: a 6-to-64 decoder is the same picture with all eight
first-stage outputs in use.

### `dec4to16`

This is the tree one size smaller. A first '138 decodes a3 alone, with B and
C tied low. Its Y0 and Y1 select one of two bank decoders, each with its own
inverter for `g1`.

### `decoder3to8`

This is the basic active-high decoder: three inverters and eight 3-input ANDs.
Output `d[i]` is 1 for input `{x,y,z} == i`, and x is the most significant
bit. It has no enable input.

## Top level

`decoder_suite_top` puts the whole family side by side, each with its own pins:

* the tree 5:32: `a` to `y_n`;
* the enable-decoded 5:32: `b` to `yb_n`;
* the 4:16: `c` to `yc_n`;
* the active-high 3:8: `x,y,z` to `d`;
* one stand-alone '138: `sel`, `g1`, `g2a_n`, `g2b_n` to `ys_n`. Its enable
  pins and its demultiplexer use can only be reached here, because inside the
  trees the enables are tied.

## Where this RTL departs from the transistor circuit

* Supply and ground pins are dropped. Transistor sizes, the 1.8 V supply and
  the output load capacitance have no meaning at logic level.
* No delays are modelled. The circuit is meant for short propagation delay,
  but the RTL has no timing figures. Timing comes from whatever library the
  RTL is synthesised into.
* In the 5:32 tree, both active-low enables of every bank decoder connect to
  the bank select, including the fourth decoder.
* The pin-level wiring of the 4:16 decoder is inferred. It follows the 5:32
  tree, one size down, with a3 on the first stage's A input.
* The immediate assertions in `ac11138`, `dec4to16`, `dec5to32` and
  `dec5to32_fig3` are checks for simulation only. They require at most one
  (or exactly one) active output. Synthesis ignores them.

## Files

`rtl/` holds one module per file:

* `inv_cell`, `and3_cell`, `nand4_cell`: the gate cells.
* `ac11138`: the building block.
* `decoder3to8`, `dec4to16`, `dec5to32`, `dec5to32_fig3`: the decoders.
* `decoder_suite_top`: the top level.

`tb/<module>_tb.sv` is a self-checking testbench for each module. Each one
prints `TB_RESULT checks=N failures=M` and stops. It also has a watchdog that
counts a failure if the run hangs. The expected values come from plain
reference expressions ("all ones except bit i") or from truth tables written
out as constants, never from the RTL.

* The 5:32 testbenches walk every address up and down, then use random
  addresses. They also replay a characterisation stimulus: five pulse
  sources with a 10 us period, high for 1, 4, 7, 2 and 5 us on a0..a4,
  sampled at 1 us steps for 20 us. `dec5to32_pulse_tb` replays that run
  once more with five free-running pulse processes. It drives both 5:32
  versions and checks them against the hand-derived line sequence 31, 30,
  22, 22, 20, 4, 4, 0, 0, 0.
* The `ac11138` testbench covers all 64 select/enable codes. It also checks
  demultiplexer operation through `g1` and through `g2a_n`.
* `decoder_suite_top_tb` runs everything together and checks that the two 5:32
  versions agree. It counts each mechanism (each bank, each output line,
  enabled, disabled by each enable pin, data routing) and fails if any of them
  never happened. The top has no parameters, so this is also the full-size
  test.

## Simulating

With Verilator 5, from the project root:

    verilator --binary --timing --assert -Irtl -Itb \
        --top-module decoder_suite_top_tb tb/decoder_suite_top_tb.sv -o sim
    ./obj_dir/sim

Replace the top module and file to run any other testbench. Lint a module with

    verilator --lint-only -Wall -Irtl rtl/dec5to32.sv

Every testbench runs in well under a second.
