# Fault-secure finite state machines

A sequential circuit is *fault-secure* when any single stuck-at fault inside
it either leaves its outputs correct or makes it raise an alarm in the same
cycle the outputs go wrong. This RTL builds one Mealy machine two ways so that
it has that property:

* **Duplication** (`dup_fsm`): two copies of the machine run in lock step and
  a totally self-checking comparator watches their outputs. It is simple and
  works for any machine, but costs more than twice the area.
* **Coding** (`coded_fsm`): the machine is built once, with redundancy put into
  the encodings instead of a second copy. The state is held in a code in which
  any two states differ in at least two bits. The outputs carry a Berger check
  symbol. The logic is shaped so that one fault can only produce errors those
  codes detect. The extra logic is mostly checkers, so its relative cost
  falls as the machine grows.

`fault_secure_fsm_top` holds both side by side, sharing only clock and reset.
Primary inputs are assumed fault-free, as in the method this design follows.

## Reading an alarm: dual-rail pairs

Every checker reports on a pair of wires `(z1, z0)`, typed `tsc_pkg::dual_rail_t`.
**`01` or `10` means no error; `00` or `11` means an error.** The verdict is
kept on two rails, not collapsed to one "error" bit, because a single stuck
wire could then hide every alarm. With two rails, a stuck-at fault inside a
checker turns some fault-free input into a non-code word. The checker then
reports its own failure: it is *totally self-checking* (TSC). Note that a
healthy pair takes both `01` and `10` during normal operation. Do not compare
it against a fixed value; test `z1 != z0` (`tsc_pkg::is_code`).

The building block is `two_rail_cell`, which checks two pairs:

    z1 = a1 b1 + a0 b0        z0 = a1 b0 + a0 b1

Its output is a code word exactly when both inputs are. `two_rail_checker`
reduces any number of pairs with a binary tree of N−1 such cells.
`tsc_eq_comparator` compares two vectors by checking the pairs `(x_i, ~y_i)`.
Each such pair is complementary only when `x_i == y_i`.

## Scheme 1: duplication

`dup_fsm` instantiates `plain_fsm` twice. `plain_fsm` is the machine with a
compact binary state and no checking. The two copies get the same inputs, each
has its own flip-flops and logic, and a 7-bit `tsc_eq_comparator` compares
their outputs. Copy A drives the outputs. A fault in either copy is flagged
once it changes that copy's outputs. A fault that only corrupts the state is
tolerated silently until then. It never produces a wrong output without an
alarm, because the other copy still has the right value.

## Scheme 2: coding

`coded_fsm` is built from the following parts. Each is needed to close one
path by which a single fault could escape.

| Part | Module | Catches |
|---|---|---|
| state register, distance-2 even-parity code | `state_assign_pkg` | a flipped flip-flop gives an odd-parity word |
| one independent cone per next-state bit | `ns_cone` (one instance per bit) | a fault in next-state logic upsets at most one bit |
| even-parity checker on the state | `tsc_parity_checker` | any single-bit state error |
| output logic with predicted check bits | `berger_output_logic` | its faults give only unidirectional errors |
| Berger generator on the outputs | `berger_generator` | recomputes the check symbol |
| check-symbol comparator | `tsc_eq_comparator` | predicted vs. recomputed check symbol |
| merge cell | `two_rail_cell` | combines the two verdicts into `err` |

### State code (`state_assign_pkg`)

Codes are assigned at elaboration time by constant functions. State 0 gets
code 0. For each further state, a counter steps upward until its value is at
Hamming distance two or more from every code given so far. That value becomes
the state's code. When the counter has no values left at the current width,
the width grows by one bit. A 0 is appended as the new least significant bit
of every existing code. The counter then restarts at 0…01. For nine states the
result is:

| state | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| code | 00000 | 11000 | 01100 | 10100 | 00110 | 01010 | 10010 | 11110 | 00011 |

Each code has an even number of ones, so any single-bit error is an odd-parity
word. The state width is ceil(log2 S)+1 bits. The test bench checks the
even-parity and distance properties for every size from 2 to 48 states.

### Independent next-state cones (`ns_cone`)

A gate shared by two next-state bits could upset both at once, turning one
valid code into another. So each flip-flop has its own `ns_cone` instance,
with its own decode of the present state and inputs. No gate is shared with
another cone. A cone is an OR of product terms, one term per (state, input
value) pair whose next-state code has a one in that bit.

### Why the output logic must be unidirectional (`berger_output_logic`)

This is the subtle part. A Berger check symbol is the count of zeros in the
information word. It detects every error in which all wrong bits move the same
way: all 0→1 or all 1→0. Such an error is called *unidirectional*. In ordinary
multilevel logic, one internal node can reach one output with no inversion on
the path and another output through an inversion. A stuck-at fault on that
node then pushes one output up and the other down. The zero count can stay
the same, and the error goes unseen.

The rule that prevents this: any factor shared between outputs may appear only
in its true (uninverted) form. Here the shared factors are product terms, one
per (state code, input value) pair. Every output bit, and every bit of the
*predicted* check symbol, is an OR of some of those terms. A term stuck at 1
can then only raise bits, outputs and check bits alike. A term stuck at 0 can
only lower them. In both cases the predicted symbol and the symbol recomputed
from the outputs disagree, or nothing changed at all. A stuck state line is a
flip-flop fault, which the parity checker covers. An unused state code selects
no term, so all outputs and check bits are 0, which is not a valid Berger word.

The check symbol is *predicted* by this logic from the state and inputs, not
derived from the outputs. That is what lets a comparison catch the error.

### Berger generator (`berger_generator`, `ones_counter`)

It inverts the outputs and counts ones with a recursive adder tree. Bit 0 is
the carry-in. Bits 1 to 2^(K-1)−1 are counted by one smaller counter and the
remaining bits by another. A (K−1)-cell ripple adder sums the two counts. When
the width is 2^K−1 the tree is full adders only: four full adders for the
7-bit outputs here. Other widths use half adders where an operand is missing.

### The machine's verdicts

`state_err` is the parity verdict and `out_err` the Berger verdict. `err` is
both merged by one more two-rail cell. All three are brought out.

## The machine being protected (`fsm_spec_pkg` and the table parameters)

The checking structures are generic. The machine itself is given to every
machine module (`plain_fsm`, `dup_fsm`, `coded_fsm`, `ns_cone`,
`berger_output_logic` and the top) by five parameters:

| parameter | meaning |
|---|---|
| `NUM_INPUTS`, `NUM_OUTPUTS`, `NUM_STATES` | sizes |
| `NS_TABLE` | next state number for each (state `s`, input value `x`), entry `s*2^NUM_INPUTS + x`, `ceil(log2 NUM_STATES)` bits each |
| `OUT_TABLE` | output vector for each (state, input value), same entry order, `NUM_OUTPUTS` bits each |

The defaults come from `fsm_spec_pkg`, which writes the machine as two
functions, `delta(state, in)` and `omega(state, in)`, and flattens them into
the tables. The example supplied is a nine-state digit sequencer with two
inputs and seven seven-segment outputs:

| `in` | next state | outputs |
|---|---|---|
| 00 | same digit | segments of the digit |
| 01 | next digit (8 → 0) | segments of the digit |
| 10 | previous digit (0 → 8) | segments of the digit |
| 11 | digit 0 | blank (all 0) |

Nine states and seven outputs were chosen to exercise the 5-bit state code and
the all-full-adder 3-bit Berger generator. To protect another machine, either
edit the sizes and the two functions in `fsm_spec_pkg`, or pass the five
parameters to `fault_secure_fsm_top` (or to `coded_fsm` / `dup_fsm` alone).
Widths of the state code (`state_assign_pkg::code_width`) and of the check
symbol (`tsc_pkg::berger_bits`) follow automatically. The assignment handles
up to 64 states (`MAX_S`).

The term-plane style of `ns_cone` and `berger_output_logic` grows as
states × 2^inputs. Machines with many inputs therefore give large logic, and
their tables take a simulator a long time to elaborate. With Verilator, a
7-input, 16-state machine builds in about 20 seconds. A 7-input, 48-state
machine with 19 outputs takes about five minutes.

## Timing and interface

Both machines are Mealy machines. Inputs are sampled on the rising edge of
`clk`, and the state changes one edge after the input that causes it. Outputs
and all error pairs are combinational in the present state and inputs, so an
alarm appears in the same cycle as the wrong value. `rst_n` is asynchronous and
active low. It puts both machines in state 0; in the coded machine that is
code 00000.

## How far to trust it, and where it departs from the method

* The method synthesises, for each machine, logic minimised cone by cone and
  output logic factored under the positive-phase rule. Here that logic is
  written as a two-level term plane. This satisfies the same rules, but it is
  not area-minimised.
* The protection depends on structure: separate cones, and no inverted shared
  factor in the output logic. A synthesis tool that flattens the hierarchy and
  re-optimises across it can destroy that structure. Keep `ns_cone` and
  `berger_output_logic` instances as separate hierarchy, and do not
  re-optimise the merged netlist.
* How the two coded-machine verdicts are combined, and the inner structure of
  the parity checker and the comparator tree, are this design's own choices.
  They use the classic TSC constructions.
* The reset behaviour, the polarity of the state-number outputs and the choice
  of copy A as the output of the duplicated machine are also this design's own
  choices.
* Checking the primary inputs, for which dual-rail inputs and an input checker
  would be needed, is not included. Inputs are assumed fault-free.

## Verification

Each module has a self-checking test bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Reference values (`tb/tb_ref_pkg.sv`) are
written out by hand, independently of the RTL's functions.

* The checkers are tested exhaustively, or at random for wide ones. Their
  output must be a code word exactly when the input should be accepted.
* The Berger generator is tested exhaustively for widths 1, 2, 3, 7, 10 and 15.
* The state assignment is checked against the nine-state table above at every
  intermediate size, and for parity and distance up to 48 states.
* `tb_coded_fsm` runs a fault-injection campaign. One at a time, it forces
  stuck-at-0 and stuck-at-1 onto every state flip-flop, every cone output,
  every output-logic product term, every output and every predicted check bit:
  112 faults. It checks that until the first alarm, the outputs and state are
  always correct. `tb_dup_fsm` does the same for the state and outputs of both
  copies.
* `tb_fault_secure_fsm_top` runs both machines end to end at full size. It
  requires every kind of transition (hold, step up and down, wrap both ways,
  return to 0) and every kind of alarm (parity, Berger, merged, duplication)
  to occur at least once.
* `tb_benchmark_sizes` builds the top at ten other sizes, taken from common
  FSM benchmarks (inputs/outputs/states 2/1/4, 2/1/9, 2/2/9, 3/5/7, 2/2/19,
  2/3/27, 4/2/10, 5/16/15, 6/9/14 and 7/7/16). Each gets a transition graph
  generated from a hash. Each run checks outputs and state codes against the
  tables for 500 random cycles, then injects a state fault and an output fault
  into the coded machine and a state fault into one copy of the duplicated
  one. Every run must see the parity, Berger and duplication alarms. The same
  run at 7/19/48 also passes, but Verilator needs about five minutes to build
  it, so it is not part of the test set.

To run one, for example the top-level test with Verilator 5:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/tsc_pkg.sv rtl/state_assign_pkg.sv rtl/fsm_spec_pkg.sv tb/tb_ref_pkg.sv \
      tb/tb_fault_secure_fsm_top.sv --top-module tb_fault_secure_fsm_top
    ./obj_dir/Vtb_fault_secure_fsm_top

The fault injection uses `force`/`release` on internal nets, so it needs a
simulator that supports forcing hierarchical references.
