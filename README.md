# Bayesian gates in hardware: odds-ratio accelerators for a soft processor

Bayesian inference on binary variables can be written as ordinary arithmetic
on *odd ratios*: a probability p becomes r = p/(1-p), in the range 0 to
infinity. Certainty becomes a special value. False is 0, True is infinity,
and "unknown" (p = 1/2) is 1. With those values, addition behaves like OR,
multiplication like AND, and the reciprocal like NOT:

| Boolean | odds |
|---|---|
| F + F = F, T + x = T | 0 + 0 = 0, inf + x = inf |
| T x F = F | inf x 0 = 0 |
| not F = T, not T = F | 0^-1 = inf, inf^-1 = 0 |

One three-input function can express all of these, much as a NAND gate does
for logic. It is the *Generic Bayesian Gate* (GUT):

    G(x, y, z) = (x + y + z) / (1 + x*y*z)

For example, G(x, y, T) = 1/(x*y), G(F, y, z) = y + z, and
G(U, T, G(x, y, T)) = x*y, where U = 1. Gates can be cascaded into trees that
evaluate a whole Bayesian expression.

This repository holds synthesizable SystemVerilog for several ways of putting
that arithmetic next to a small embedded processor. Each unit is a
multi-cycle *custom instruction* of a Nios II-style processor:

* **Single floating-point gate with DMA.** One gate shares one adder, one
  multiplier and one divider, used one after another.
* **Static tree of gates with DMA.** Its first layer is loaded while the
  inputs stream in from memory.
* **Four-gate tree** wired for one fixed expression.
* **Bayesian-algebra ALU.** Add, multiply and divide with the special cases
  of the table above.
* **Tree of Bayesian operators** for a fixed expression.
* **Combinational 16-bit fixed-point gate.** It works on probabilities
  rather than odds.

All of them are instantiated side by side in `bayes_top`.

## Numbers: odds in IEEE single precision

Every floating-point unit carries odds as 32-bit IEEE-754 words (`float_t`
in `ba_pkg`). A word is classified by its exponent field:

* all ones (infinity, and also NaN patterns) is **True**;
* zero (zero and denormals) is **False**;
* anything else is a finite positive number.

The sign bit is ignored, because odds are never negative. The arithmetic
rounds to nearest even and flushes denormals to zero. These details are
choices of this design. The reference vendor cores would differ from it in
the last bit in rare cases.

## The floating-point units (`fp_add`, `fp_mult`, `fp_div`)

Each unit is combinational IEEE arithmetic followed by a register chain
whose depth is its `LATENCY`. A new operand pair may enter on every enabled
cycle (`clk_en`). The default latencies are add 7, multiply 5 and divide 6
cycles, matching the vendor cores the design was sized around. `fp_add` also
reports `overflow` and `zero` flags.

## The gate controller (`gut_controller`, `gut_fp`)

Most gate input combinations need no arithmetic at all. The controller
latches x, y, z on `ncs_start` and sorts them into False, True and number.
From that sort it either answers from the truth table or runs one of three
arithmetic schedules:

| inputs (any order) | result | state | cycles |
|---|---|---|---|
| F,F,F / F,F,z | 0 / z | START | 1 |
| F,T,any / F,F,T | inf | START | 1 |
| T,T,any / T,T,T | 0 | START | 1 |
| F, y, z | y + z | CALC_ADD | 9 |
| T, y, z | 1/(y*z) | CALC_DIV | 14 |
| x, y, z | (x+y+z)/(1+xyz) | CALC_FUNC | 32 |

"Cycles" counts from the cycle after the start cycle up to, but not
including, the cycle in which `ncs_done` is high.

Each arithmetic step holds its operands on a unit for that unit's latency
plus one cycle, then takes the result. CALC_FUNC has four steps:

1. x+y and x·y, side by side;
2. +z and ×z, side by side;
3. xyz + 1;
4. the division.

That gives 8 + 8 + 8 + 7 = 31 cycles, plus one to leave the state. The state
sequence for a combinational case is IDLE → START → DONE → IDLE. If xyz + 1
overflows, the result is 0, which is the limit of the function.

`gut_fp` is the controller together with its three units. It is one
complete gate with the custom-instruction handshake:

* pulse `ncs_start` with x, y, z valid;
* wait for the one-cycle `ncs_done`;
* read `ncs_result`, which holds its value until the next result.

`ncs_clk_en` low freezes the whole gate.

## Getting three operands through a two-operand instruction (`dma_controller`)

A custom instruction carries only two 32-bit operands, and a gate needs
three. A tree needs many more. So the processor passes the **byte address**
of an input array in `ncs_dataa`. The DMA controller then does the rest:

* It reads `3*N_GROUPS` words with **one Avalon-MM burst read**.
  `avm_address`, `avm_read` and `avm_burstcount` are held while
  `avm_waitrequest` is high. An assertion checks this.
* It counts incoming words while `avm_readdatavalid` is high. Gaps in the
  data are allowed.
* As soon as the third word of group g has arrived, it drives
  `dataX/dataY/dataZ` and pulses `gut_start` for one cycle with
  `gut_select = g+1`. The first gate therefore starts computing while the
  rest of the burst is still arriving.
* It waits for the accelerator's done, registers the result, and answers
  the processor with `ncs_done`/`ncs_result`.

`ncs_clk_en` only qualifies taking a start and leaving the done state. A
burst in flight cannot be paused, so the bus side and the accelerator keep
running. Address bits [1:0] are ignored, since reads are word aligned.

`gut_ci` is the single-gate instruction: the DMA controller with one group,
plus `gut_fp`. Against a memory with 6 cycles of read latency and random wait
states, an instruction takes about 15 to 55 cycles, depending on the gate
case and the bus.

## Static gate trees (`gut_tree_static`, `gut_tree_ci`)

A full ternary tree has `LAYERS` layers, with 3^(LAYERS-1) gates in the
first layer and one gate at the output. With the default `LAYERS = 2` it has
four gates. `LAYERS = 3` gives the 13-gate tree.

* First-layer gate i starts on `gut_start && gut_select == i+1`, so the
  select value works like the outputs of a one-hot decoder.
* A gate in a higher layer needs all three children, and they finish at
  different times. A done pulse from a child therefore sets a sticky flag.
* The parent starts on the cycle all three flags of its children are set.
  Starting the parent clears the flags.
* The done of the output gate is the done of the tree.

`gut_tree_ci` puts the DMA controller in front with `N_GROUPS =
3^(LAYERS-1)`, so the whole first layer comes from one burst. The first
gates compute while later groups are still on the bus.

How long an instruction takes depends on the gate cases in each layer.
`tb_ci_timing` measured this against a memory with 6 cycles of read latency
and no wait states:

| unit | all inputs False | all inputs finite | difference |
|---|---|---|---|
| single gate | 16 | 47 | 31 |
| 2-layer tree (4 gates) | 25 | 87 | 62 |
| 3-layer tree (13 gates) | 46 | 139 | 93 |

Each layer adds 31 cycles in the worst case: a gate takes 32 cycles
instead of 1. Measurements of the original system on a processor, with its
software overhead, show a similar spread of about 33, 64 and 97 cycles.

## A tree for one expression (`gut_tree_dyn`)

Gates may take constants and inputs at any layer. This avoids the full
ternary shape. The unit computes

    1 / ((a+b) * (1/c + d)) = G(T, G(F,a,b), G(F, G(T,U,c), d))

with four floating-point gates:

* G(T,U,c) and G(F,a,b) start together;
* G(F,·,d) starts on the done of the first one;
* the output gate starts once both of its gate inputs are done, using the
  same sticky flags as the static tree.

For finite inputs the result appears 41 cycles after the start.

## The Bayesian-algebra ALU (`ba_add`, `ba_mult`, `ba_div`, `ba_alu_ci`)

Plain IEEE arithmetic gets the table at the top wrong in a few places:

* 0 × inf is NaN instead of 0;
* x / 0 traps or gives inf with a sign;
* inf / inf is NaN.

Each Bayesian operator wraps a floating-point unit. Next to the unit, a
special-case code is computed from the inputs and travels down a register
chain of the same depth. At the output that code overrides the arithmetic
result:

| operator | rule |
|---|---|
| `ba_add` | any True input gives inf; an overflowing sum gives inf |
| `ba_mult` | any False input gives 0 (so 0 × inf = 0); otherwise any True input gives inf |
| `ba_div` | a/b read as a × b^-1, so x/inf = 0, 0/x = 0, 0/0 = 0, inf/inf = 0, inf/x = inf, x/0 = inf |

`ba_alu_ci` feeds the same two operands to all three operators. Its
controller (`ba_gate_control`) reads `ncs_n`:

* 0 selects add, 1 multiply, 2 divide;
* it waits the selected operator's latency and returns that result with
  `ncs_done`;
* `ncs_done` comes latency + 1 cycles after `ncs_start`, that is 8, 6 and 7
  cycles;
* `ncs_n = 3` answers at once with 0.

Only one operation is in flight at a time, as in an ordinary ALU.

## The operator tree (`ba_tree`)

The fixed expression (in1 + in2 + in3) / (in3 × in4) is built from two
Bayesian adders, a multiplier and a divider:

    ADD1(input1, input2) -> ADD2(·, input3) -> DIV(·, MULT(input3, input4))

It has no handshake: it is a free-running pipeline with one `clock_enable`.
The two branches have different depths, 14 and 5 cycles, and no balancing
registers. The output is therefore the intended function only when the
inputs have been held for 20 cycles. While the inputs change it mixes
operands of different ages.

## The fixed-point gate (`gut_fixed`)

This gate works on probabilities instead of odds. It uses the gate function
rewritten for p, q, r in [0, 1]:

    g'(p,q,r) = (p + q + r - 2(pq + qr + pr) + 3pqr) / (1 - pq - qr - pr + 3pqr)

Inputs and output are Q_SIZE-bit unsigned fractions (default 16 bits). All
ones stands for 1, that is True. The module is purely combinational:

* each product is rounded half up to Q_SIZE fraction bits;
* intermediates carry I_SIZE = 8 integer bits and saturate;
* the quotient is rounded the same way;
* a result of 1 or more, or a zero divisor, gives all ones.

On the ten reference vectors the design was checked against, it matches
nine exactly. The remaining case, (1, 0x5000, 0x0700), gives 0xFCC4 where
the reference has 0xFCC5. The exact rounding of the original is not known.

## The top (`bayes_top`)

The six units stand side by side. They share `clk`, a synchronous
active-high `reset` and the processor's `clk_en`. Each brings out its own
ports, grouped by prefix:

| prefix | unit |
|---|---|
| `gut_*` | single-gate instruction with its Avalon-MM master |
| `tree_*` | static-tree instruction (`TREE_LAYERS`, default 2) with its own master |
| `alu_*` | Bayesian ALU instruction (`alu_n` selects the operation) |
| `fix_*` | fixed-point gate: p in `fix_dataa[15:0]`, q in `fix_dataa[31:16]`, r in `fix_datab` |
| `dyn_*` | four-gate tree |
| `bat_*` | operator tree |

The processor and the memory are outside the design. Their sides of the
custom-instruction and Avalon interfaces are the top's ports.

## Simulating

Everything is plain SystemVerilog-2017. The packages `rtl/ba_pkg.sv` and, for
testbenches, `tb/tb_fp_pkg.sv` must come first. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_bayes_top \
        -y rtl -y tb +libext+.sv rtl/ba_pkg.sv tb/tb_fp_pkg.sv tb/tb_bayes_top.sv
    ./obj_dir/Vtb_bayes_top

Every testbench prints `TB_RESULT checks=N failures=M` and stops, and each
has a watchdog. The testbenches compute their expected values with
`tb_fp_pkg`, which does single-precision arithmetic through double precision
with its own round-to-nearest-even and flush-to-zero. It does not use the
simulator's `shortreal`. There are two models:

* `avalon_mem_model` is a burst-capable memory with read latency, random
  wait states and random gaps between data words.
* `tb_dma_harness` and `tb_tree_harness` wrap the DMA units for their tests.

`tb_bayes_top` runs the whole top at its default sizes:

* the sprinkler-network query (a10·x10 + a11·x11) / (1 + a01·x01) on the ALU;
* products built from gates;
* every gate case through DMA;
* static-tree calls;
* the four-gate tree, checked bit-exact against the same expression done
  as five ALU instructions;
* the operator tree;
* the fixed-point reference vectors.

`tb_ci_timing` produces the instruction-time table above. It uses gate
trees of up to three layers.

`tb_bayes_top` also counts each mechanism and fails if one never happened:

* each gate case;
* memory wait states and gaps in a burst;
* first-layer loads, and a tree gate started by its children;
* each ALU operation and the 0 × inf case;
* fixed-point saturation;
* a clock-enable freeze.

## Where this design departs from or goes beyond the original description

* The floating-point units are written from scratch. They round to nearest
  even and flush denormals. Their latencies are the vendor cores' (7/5/6).
* The order of operations inside CALC_FUNC is this design's. It reproduces
  the published total of 32 cycles.
* These are this design's choices:
  * the operand convention of the DMA instructions (address in `ncs_dataa`,
    one burst, word aligned);
  * the one-cycle done;
  * the handling of `ncs_clk_en`.
* The tree's "wait for all children" is built with sticky done flags.
* The `ncs_n` encoding of the ALU (0 add, 1 multiply, 2 divide) is assumed.
* The operator-tree wiring is one reading of a block diagram.
* Not built:
  * the processor and SDRAM, which are external parts;
  * a pipelined gate tree, which is mentioned only as an option and in
    power figures.

  A tree produced by an expression-to-gates generator is represented by
  the one hand-wired example, `gut_tree_dyn`.
