# Low-power 2-bit magnitude comparator

This comparator takes two unsigned 2-bit numbers, A = {A1,A0} and B = {B1,B0}.
It raises exactly one of three outputs:

| output  | meaning |
|---------|---------|
| `f1_lt` (F1) | A < B |
| `f2_eq` (F2) | A = B |
| `f3_gt` (F3) | A > B |

A textbook comparator evaluates three priority equations, one per output.
This design uses fewer gates in three ways:

* **A<B picks its answer by the value of A.** Once A is fixed, "is B larger?"
  becomes a very simple function of B. The bits of A only select which of
  those functions reaches the output.
* **A=B is gated by the low bits.** When A0 = B0, equality depends only on the
  high bits, so F2 = A1 XNOR B1. When A0 ≠ B0, F2 = 0.
* **A>B is not computed at all.** The three outcomes are mutually exclusive,
  so F3 = NOR(F1, F2).

In the transistor circuit that this RTL models, every selection is a pair of
transmission gates. The two gates take complementary controls and share an
output node. Pass transistors at the inputs form the simple functions of B.
The result is a small, static-logic circuit, about 46 transistors against 76
for a transmission-gate version of the textbook equations. The RTL keeps the
same selection structure. Each transmission-gate pair becomes a 2:1
multiplexer.

## F1: A less than B (`rtl/f1_less.sv`)

| A1 A0 | F1 |
|-------|----|
| 0 0 | B1 + B0 (any non-zero B is larger) |
| 0 1 | B1 (B must be 2 or 3) |
| 1 0 | B1 · B0 (B must be 3) |
| 1 1 | 0 (no 2-bit B is larger) |

The selection has two levels:

1. Two multiplexers steered by A0 form the candidate for A1 = 0
   (B1+B0 or B1) and the candidate for A1 = 1 (B1·B0 or 0).
2. A final multiplexer steered by A1 drives F1.

The order, A0 first and A1 at the output, follows the published circuit.
Either order gives the same function.

## F2: A equal to B (`rtl/f2_equal.sv`)

First, X1 = A1 XNOR B1 is formed once. Two levels of selection follow:

| A0 | B0 = 0 | B0 = 1 |
|----|--------|--------|
| 0  | X1     | 0      |
| 1  | 0      | X1     |

The first level is steered by B0 and chooses between X1 and a constant 0. The
second level is steered by A0. Together the two levels compare A0 with B0, so
only one XNOR gate is needed. The original description counts two XNORs for
F2. This RTL uses the B0/A0 selection tree in place of the second one, which
gives the same truth table.

## F3: A greater than B (`rtl/f3_greater.sv`)

F3 = ~(F1 | F2). F3 settles one gate delay after the later of F1 and F2. This
path is the longest in the design.

## Top level (`rtl/mag_comp2.sv`)

`f1_less` and `f2_equal` work side by side on the same inputs. `f3_greater`
combines their outputs. The helper `rtl/tg_mux2.sv` is the 2:1 selection
stage used by both F1 and F2.

There is no clock, reset or register. The outputs are pure functions of `a`
and `b`. A deferred assertion in the top module checks that exactly one output
is high. In Verilator, build with `--assert` to enable it.

Ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a` | in | 2 | operand A, unsigned |
| `b` | in | 2 | operand B, unsigned |
| `f1_lt` | out | 1 | A < B |
| `f2_eq` | out | 1 | A = B |
| `f3_gt` | out | 1 | A > B |

The design has no parameters. Its width is fixed at 2 bits because the F1 and
F2 decompositions above are specific to 2-bit operands.

## What the RTL does and does not capture

* The logic function is exact. All 16 input combinations match the complete
  truth table of a 2-bit comparator.
* The circuit's selling points are all analog and none of them exist in RTL:
  * transistor count;
  * the 13–20 % threshold-voltage loss of the pass-transistor input stage;
  * power across supply voltage (0.7–1.0 V), temperature (−10 to 60 °C) and
    input rate (100–500 MHz) at 45 nm.

  Synthesising this RTL to a standard-cell library gives an ordinary
  comparator. The gate count and power are then whatever the library and tool
  produce, not the transmission-gate circuit's figures.
* Modelling a transmission-gate pair as a multiplexer is an abstraction. The
  RTL cannot show the weak logic levels that pass devices produce.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops via a watchdog if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `f1_less_tb` | all 16 pairs against an integer `<` and against the F1 truth-table column |
| `f2_equal_tb` | all 16 pairs against `==` and against the F2 column; both low-bit cases are exercised |
| `f3_greater_tb` | the four NOR input combinations, then the stage driven as the comparator drives it |
| `mag_comp2_tb` | the whole comparator: 16 ordered and 200 random vectors against an integer comparison and the full truth table, plus a one-hot check |

`mag_comp2_tb` also counts how often each mechanism was used:

* the four A-selected F1 cases;
* F2 with the low bits equal and with them different;
* F3 high.

A mechanism that is never used counts as a failure. The truth tables in the
testbenches are 16-bit constants: bit *i* is the row where {A1,A0,B1,B0} = *i*.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -y rtl tb/mag_comp2_tb.sv --top-module mag_comp2_tb
./obj_dir/Vmag_comp2_tb
```

Replace `mag_comp2_tb` with any other testbench name to run that one. Every
run completes in well under a second.
