# Wave-pipelined 63-bit population counter

This is a population counter: it counts the ones in 63 input bits and gives a
6-bit result. It is combinational logic made so that it can be **wave
pipelined**. A new input vector can be applied every 4 ns even though a result
takes about 8.5 ns to reach the outputs. Two or three vectors therefore travel
through the logic at once, each as its own "wave", and no register separates
them. This works only if every path from an input to an output has the same
delay. Then each wave moves through the logic in step and never catches up with
the wave ahead of it. The whole design is shaped by that rule:

* every function is built from one kind of cell, a current-mode-logic (CML)
  OR/NOR gate, so every logic level has the same delay;
* every input-to-output path crosses exactly the same number of cells
  (20 for 63 inputs). Short paths are padded with buffer cells, a step called
  *rough tuning*.

The RTL describes the logic of a bipolar demonstration chip: 63 logic inputs
driven from 16 pins, 6 outputs, and no clock, reset or storage element. By
default it is ordinary synthesizable combinational logic. It also has a timing
mode: give every cell a delay and you can watch the waves in simulation (see
"Timing model" below).

## Structure

```
 b[15:0] pins ──► pin sharing ──► input rank ──► carry-save tree ──► lookahead adder ──► d[5:0]
                  (63 inputs)     1 level        7 stages x 2 levels   5 levels
                                  (dual rail)    59 3-2 counters       6 bits
```

| module           | role |
|------------------|------|
| `popcount_chip`  | top: 16 pins, pin sharing, the core, 6 outputs |
| `popcount_core`  | input rank + `csa_tree` + `cla_adder`; `count` = number of ones in `x` |
| `csa_tree`       | carry-save adder tree of 3-2 counters, two 6-bit rows out |
| `cla_adder`      | 6-bit carry-lookahead adder of the two rows |
| `counter_3_2`    | 3-2 counter (full adder) = `cml_xor3` + `cml_maj3` |
| `cml_xor3`, `cml_maj3` | parity and majority of three, two cell levels each |
| `delay_chain`    | rough-tuning pad: a chain of one-input cells |
| `cml_or_nor`     | the only logic cell: N-input OR with a complementary NOR output |
| `popcount_pkg`   | `rail_t`, `RAIL0`, and the elaboration-time tree-shape functions |

### The cell, and why signals are dual-rail

A CML gate steers a tail current between a row of input transistors and a
reference transistor. Its two load resistors give the OR of the inputs and
its complement at no extra cost. `cml_or_nor` models exactly that: `y = |a` and
`y_n = ~y`, with any fan-in `N`.

Every signal in the counter is carried as a `rail_t` pair `{t, f}` (true and
complement). With both polarities at hand, an AND term is a NOR of the
complemented literals: `a & b = NOR(~a, ~b)`. So any two-level sum of products
takes exactly two levels of the same cell. All logic is built this way:

* `cml_xor3`: the four odd-parity minterms (3-input NORs), then a 4-input OR;
* `cml_maj3`: the products `ab`, `bc`, `ac` (2-input NORs), then a 3-input OR.

The sum and carry of a 3-2 counter therefore both appear exactly two cell
delays after its inputs. The 63 inputs get their complement from a rank of
one-input cells at the core's input. That adds the first level.

### Carry-save tree

Bits are kept by column (column *c* has weight 2^c). At each stage, every
column with more than two bits is cut into groups of three, and each group
feeds a 3-2 counter. The counter's sum stays in the column and its carry moves
to the next column. A leftover pair feeds a counter whose third input is tied
to 0 (a half adder). A leftover single bit passes. Columns with two bits or
fewer pass unchanged. The tree stops when no column has more than two bits.
For 63 inputs, the bits per column after each stage are:

| stage | col 0 | col 1 | col 2 | col 3 | col 4 | col 5 |
|-------|------:|------:|------:|------:|------:|------:|
| 0 (inputs) | 63 | | | | | |
| 1 | 21 | 21 | | | | |
| 2 | 7 | 14 | 7 | | | |
| 3 | 3 | 7 | 8 | 2 | | |
| 4 | 1 | 4 | 5 | 5 | | |
| 5 | 1 | 2 | 3 | 4 | 2 | |
| 6 | 1 | 2 | 1 | 3 | 3 | |
| 7 | 1 | 2 | 1 | 1 | 2 | 1 |

The last stage's bits form `row_a` and `row_b`. A missing bit is the constant
`RAIL0`, so 8 of the 12 row bits are real signals. The shape is not written
out by hand. The functions `tree_count`, `col_counters`, `col_pass` and
`tree_offset` in `popcount_pkg` compute it at elaboration time, and the
generate loops in `csa_tree` follow them. Changing `N_IN` therefore reshapes
the tree. Carries out of the top column are left unconnected. They would weigh
2^W, and a count of fewer than 2^W ones never reaches that, so they are always 0.

### Lookahead adder

`cla_adder` adds the two rows with full lookahead and no ripple:

1. `g_i = a_i b_i` (NOR of complements) and `p_i = a_i + b_i`;
2. for every carry *i* and every *j < i*, the product
   `g_j p_(j+1) ... p_(i-1)` (one NOR cell of fan-in *i − j*);
3. `c_i` = OR of those products (fan-in up to 5);
4. and 5. `s_i = a_i ^ b_i ^ c_i` (`cml_xor3`).

There is no carry in and no carry out. In the counter the two rows never add
up to more than 63.

### Balanced depth (rough tuning)

For every path to have the same depth, every bit that skips a counter in a
tree stage goes through a two-cell `delay_chain`. The operand bits of the adder
go through three cells before their sum parity, to meet the carries, which
arrive after three levels. The carry `c_1` is a single product term, so it
already passes through one-input cells at levels 2 and 3. Every path is then

    1 (input rank) + 2 × 7 (tree) + 5 (adder) = 20 cell levels,

which `popcount_pkg::core_depth(63)` returns. By construction the core has
723 cell instances:

* 63 in the input rank;
* 531 in the 59 counters;
* 34 tree pads;
* 95 in the adder, 36 of them pads.

`ROUGH_TUNE = 0` replaces all pads with plain wires. The logic is unchanged,
but paths then differ in depth. This is the untuned circuit, kept for
comparison.

### Pins and the complement property

Only 16 input pins exist. Logic input *i* is wired to pin `b[i % 16]`, so pins
0–14 each drive four inputs and pin 15 drives three. Inverting every pin
inverts every logic input, and the count *n* becomes 63 − *n*. In six bits,
that is exactly the bitwise inverse of *n*. This holds only for a 2^k − 1 input
counter. A tester exploits it with *return-to-complement* vectors: each vector
is followed by its complement, so every output switches on every vector, the
hardest case for wave pipelining.

## Timing model

Every module has `GATE_DELAY` (default 0) and passes it down to each
`cml_or_nor`. With `GATE_DELAY > 0` each cell's outputs follow its inputs
after that many time units. Because every path has 20 cells, a count appears
exactly `20 × GATE_DELAY` after its pin vector and holds until the next
vector's count arrives. With `GATE_DELAY = 425`, where a unit stands for 1 ps,
the latency is the original's nominal 8.5 ns. Vectors can then follow each
other every 4 ns (250 MHz) with three waves in flight, and each output holds
a full period. The untuned copy (`ROUGH_TUNE = 0`) gives wrong counts at that
rate. It works as a plain single-wave circuit at a 10 ns period.

What the model leaves out, and why its speed limit is not the real one:

* All cells have the same delay. The real chip's delays differ with fan-out,
  wiring capacitance and data, and the tuning software trims each cell's
  current to compensate. Only the level count is balanced here, so the model's
  path-delay spread is zero. On the original part, the layout alone left
  about 1.1 ns of spread, and all effects together less than 2.75 ns.
* Rise/fall times, clock or tester skew, and setup/hold times are not
  modelled. The real limit is roughly period > spread + 2·skew + setup +
  hold + rise/fall time, about 4 ns for the original parts. In the model, any
  period above one cell delay works.
* Pad buffers, the 1 ns output drivers, and the bias and reference voltage
  generators are analog and are not described. The ports stand for the pins.

`GATE_DELAY` uses `#` delays inside a generate branch that is active only when
it is non-zero. The default build therefore has no delays, and synthesis sees
plain OR/NOR logic.

## Verification

Every testbench is self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_cml_or_nor` | OR/NOR truth tables; the timed cell switches exactly `GATE_DELAY` after its input |
| `tb_delay_chain` | value passes unchanged and arrives exactly `STAGES × GATE_DELAY` later; `STAGES = 0` is a wire |
| `tb_counter_3_2` | all 8 input cases, both rails; timed sum and carry both arrive after exactly 2 delays |
| `tb_cla_adder` | all 4096 operand pairs; timed: outputs change only at exactly 5 delays after an input change (no glitches) |
| `tb_csa_tree` | rows add up to the count, for edge and random vectors; timed: row bits change only at exactly 14 delays |
| `tb_popcount_core` | edge vectors, every weight 0–63, 20,000 random vectors, the complement property, depth 20 / 7 stages / 59 counters |
| `tb_popcount_chip` | end to end (see below) |
| `tb_popcount_chip_full` | default parameters: all 65,536 pin patterns, each followed by its complement |
| `tb_tester_sequence` | a tester-style program (see below) |

`tb_popcount_chip` runs three copies of the chip on the same pins: ideal,
timed and rough tuned, and timed without tuning. It checks:

* pin weights;
* 800 wave-pipelined return-to-complement samples at 4 ns, taken at both ends
  of each wave's window;
* that at least two waves were in flight (it sees four vectors applied but not
  yet sampled);
* that the untuned copy fails at 4 ns and passes at 10 ns.

`tb_tester_sequence` runs:

* 20,000 vectors at 40 MHz;
* return-to-complement sequences of 1,000 vectors at 4.250, 4.125, 4.000 and
  3.875 ns;
* a delay test: the last output change comes exactly 8500 units after a full
  pin inversion;
* a 200 MHz valid-window test: outputs never change within less than 5000
  units of each other.

A real tester program uses 40,000 vectors per rate. The event-driven timed
simulation costs several ms per wave, so 1,000 are used here.

To run one with Verilator (the timed testbenches take a few minutes to compile):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/popcount_pkg.sv tb/tb_popcount_chip_full.sv \
  --top-module tb_popcount_chip_full -o sim
./obj_dir/sim
```

Lint runs clean under `verilator --lint-only -Wall` except for unused-signal
warnings. They are deliberate: unused complement rails, the constant-zero
carries of the top tree column, and unused generate/propagate cells are not
built or are left open.

## Where this design departs from, or adds to, the original

* **Logic depth: 20 levels, not 21.** The original gate netlist is not
  available. The tree shape, the two-level counter netlist and the
  single-level lookahead here are this design's own choices. The original has
  "about 800" gates; this netlist has 723 cells.
* **Pin wiring** (`i mod 16`) and pin numbering are this design's choice. Only
  the number of pins (16) and that several inputs share each pin are given.
* **Padding is structural.** The original tuning software inserts a minimal
  set of buffers into a given netlist, then sets each cell's current. Here the
  pads follow from the tree rule, and the cells share one ideal delay.
* **Cell fan-in** goes up to 5 in the adder. No limit is stated for
  single-level cells.
* The adder has no carry-out. It is not needed for a 63-input count.

## Changing it

* `N_IN` (core, tree, chip) sets the number of inputs; the width follows as
  `$clog2(N_IN + 1)` and the tree reshapes itself. The complement test holds
  only for `N_IN = 2^k − 1`. `tb_popcount_core` hard-codes the 63-input shape
  (20 levels, 7 stages, 59 counters).
* `N_PINS` sets the pin count for the sharing rule `i % N_PINS`.
* `ROUGH_TUNE = 0` removes the pads; `GATE_DELAY` turns on the timing model.
