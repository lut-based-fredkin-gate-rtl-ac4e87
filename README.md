# Fredkin gates as one-variable LUTs, and reversible full adders built from them

A Fredkin gate is a controlled swap. It has three lines in (C, B, A) and
three lines out (F1, F2, F3). The control line passes straight through
(F1 = C). The two data lines pass straight when C = 0 and swap places when
C = 1:

| C B A | F1 F2 F3 |    | C B A | F1 F2 F3 |
|-------|----------|----|-------|----------|
| 0 0 0 | 0 0 0    |    | 1 0 0 | 1 0 0    |
| 0 0 1 | 0 0 1    |    | 1 0 1 | 1 1 0    |
| 0 1 0 | 0 1 0    |    | 1 1 0 | 1 0 1    |
| 0 1 1 | 0 1 1    |    | 1 1 1 | 1 1 1    |

In Boolean form, F2 = CA | ~C B and F3 = ~C A | C B. The gate is reversible
in three ways:

- its map from inputs to outputs is one-to-one;
- it keeps the number of ones, like a "billiard-ball" computer that can only
  move balls, never make or lose them;
- it is its own inverse, so feeding F1, F2, F3 back in gives C, B, A again.

It is also universal. With B = 0, F2 = CA (AND). With B = 1, F3 = C | A (OR).
With B = 1 and A = 0, F2 = ~C (NOT).

This RTL contains three things:

- the gate, built the way a one-variable FPGA look-up table is built;
- a two-mode version of the gate that can also run from outputs to inputs;
- one-bit full adders made of five such gates, including an adder that runs
  backwards.

Everything is combinational. There is no clock, reset or state.

## Files

| file | what it is |
|------|------------|
| `rtl/fredkin_pkg.sv` | the mode enum (`MODE_FORWARD`, `MODE_BACK`) and structs for one gate side and for the two ends of an adder |
| `rtl/fredkin_lut.sv` | forward-only Fredkin gate in the LUT style |
| `rtl/fredkin_lut_bidir.sv` | two-mode Fredkin gate |
| `rtl/fg_adder5.sv` | the classic five-gate reversible full adder |
| `rtl/fg_adder_synth.sv` | the five-gate adder that the decomposition method derives |
| `rtl/fg_adder_bidir.sv` | the derived adder made of two-mode gates, able to run backwards |
| `rtl/fredkin_top.sv` | all of the above side by side, each with its own ports |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The gate as a one-variable LUT (`fredkin_lut`)

An FPGA LUT is a tree of pass switches. The select variables steer one of the
stored bits to the output. Here the tree has one select variable, C, and the
gate needs two such trees, one for F2 and one for F3. The "stored bits" are
the live inputs ~A and ~B rather than configuration memory.

The cell models this circuit:

- C goes through two inverters in series to F1. The middle node gives ~C,
  which steers the switches.
- B and A each pass through one inverter.
- Four pass switches sit in front of the outputs. The F2 node takes ~B when
  C = 0 and ~A when C = 1. The F3 node takes ~A when C = 0 and ~B when C = 1.
- One inverter on each of the F2 and F3 nodes restores the true polarity.
  These inverters also restore signal levels after a chain of pass switches.

In RTL, each pair of switches is written as a 2-to-1 selection. The
inverters are kept as named nets so that the structure can be read in the
code. Synthesis folds the inverters away, so the gate becomes two 2-input
multiplexers, and F1 is a plain wire from C. The transistor circuit needs 16
transistors; that figure has no counterpart in RTL.

## Running a gate backwards (`fredkin_lut_bidir`)

In a reversible circuit, you can put values on the outputs and "roll" them
back to the inputs. Because the Fredkin gate is its own inverse, back mode
uses the same function:

- C = F1;
- when F1 = 0, B = F2 and A = F3;
- when F1 = 1, B = F3 and A = F2.

At transistor level, every terminal has two pairs of restoring inverters. One
pair is enabled by a Forward signal, the other by a Back signal, and both
directions share one set of switches. That costs 40 transistors instead of 16.

Two-state synthesizable logic cannot express a wire that is driven from
either end. This model therefore differs from the transistor circuit in four
ways:

- **Split terminals.** Each terminal is split into an input half and an output
  half, as for a pad: `left_i`/`left_o` = {C, B, A} and
  `right_i`/`right_o` = {F1, F2, F3}.
- **One mode bit.** The Forward and Back nets become a single input,
  `mode`, of type `fg_mode_e`.
- **Idle side drives zeros.** The side that is listened to in the current
  mode drives all zeros on its output half.
- **Two copies of the switch network.** The shared switch network becomes two
  directional copies. This way no path leads from a side's input half to its
  own output half, and a chain of these cells has no combinational loop, not
  even a structural one.

## Five-gate full adders

A reversible adder may not fan a signal out, and it may not drop
information. The adder therefore runs five lines through five gates:

- the operands p and q;
- the carry-in r;
- two constant ("ancilla") lines at 0 and 1.

A value that is needed twice is carried along on the F1 output of the gate
it controls. The adder produces five outputs:

- p and q, unchanged;
- the sum p^q^r, which is the parity;
- the carry-out;
- one garbage bit g = ~p&~q | ~q&r | ~p&r. The garbage bit exists only to
  keep the map one-to-one.

### Classic circuit (`fg_adder5`)

This is the circuit from the reversible-logic literature. With s = p^q^r:

| gate | C | B | A | result |
|------|---|---|---|--------|
| 1 | p | line 0 (=0) | line 1 (=1) | line 0 = p, line 1 = ~p |
| 2 | q | line 0 | line 1 | line 0 = p^q, line 1 = ~(p^q) |
| 3 | r | line 0 | line 1 | line 0 = s, line 1 = ~s |
| 4 | line 0 (s) | r | line 1 | r-line = ~s&r, line 1 = ~s\|r |
| 5 | q | r-line | line 1 | r-line = carry, line 1 = g |

Gates 1 to 3 build the parity from the two constants: each stage swaps the
pair {x, ~x} or not. Gates 4 and 5 turn the parity, r and q into the carry.
In the two cases:

- q = 1 gives carry = ~s|r = p|r;
- q = 0 gives carry = ~s&r = p&r.

### Derived by decomposition (`fg_adder_synth`)

The same kind of circuit can be derived from the wanted function, starting
at the output:

1. Write the target f as the F2 output of the last gate, FG(k).
2. Pick a variable x and Shannon-expand: f = x·g | ~x·h. Because
   F2 = CA | ~C B, FG(k) has C = x, A = g and B = h.
3. Each of g and h must itself be the F2 or F3 output of an earlier gate.
   Expand it the same way.
4. Stop when every gate input is a primary variable or a constant.

A variable that is a control at one step and needed again later must reach
that later gate on some gate's F1. This is how fan-out is avoided.

Applying the method to the carry gives this chain (s = p^q^r):

| gate | C | B | A | F1 | F2 | F3 |
|------|---|---|---|----|----|----|
| FG(k-4) | q | 0 | 1 | q | q | ~q |
| FG(k-3) | p | q | ~q | p (out) | p^q | ~(p^q) |
| FG(k-2) | r | p^q | ~(p^q) | r | s | ~s |
| FG(k-1) | s | r | ~s | s (sum out) | ~s&r | ~s\|r |
| FG(k)   | q (from FG(k-4).F1) | ~s&r | ~s\|r | q (out) | carry (out) | g (unused) |

It is the classic circuit with the first two gates' controls exchanged (q
first, then p). It computes the same five outputs, which the testbenches
confirm.

**Constants on FG(k-4).** The derivation can be read as putting the
constants 1, 0 on B, A. This RTL uses B = 0, A = 1. That is the only choice
that gives F2 = q and F3 = ~q, and FG(k-3) needs exactly those. With B = 1,
A = 0 the adder computes wrong sums and carries.

### Running the adder backwards (`fg_adder_bidir`)

This is the chain above built from `fredkin_lut_bidir`, with one `mode` input
shared by all five gates:

- **Forward mode.** It adds. The left end is {p, q, r, anc0, anc1}; hold
  anc0 = 0 and anc1 = 1.
- **Back mode.** You put a five-bit output word {p, q, sum, carry, g} on the
  right end. Each gate undoes itself in reverse order. For a word that the
  adder can produce, the left end shows the p, q, r that produced it, plus 0
  and 1 on the ancilla lines. For example, {p=1, q=1, sum=1, carry=1, g=0}
  rolls back to p = q = r = 1.

Every line between two gates has two halves. The forward half is driven by
the gate on its left, and the back half by the gate on its right.

The ancilla lines are real inputs here, so the module is a permutation of
all 32 five-bit words. If the ancillas are not held at 0 and 1 in forward
mode, the result is still reversible but is not a sum.

## Top (`fredkin_top`)

There is no larger system around these circuits, so the top places four
instances side by side, sharing nothing:

- one `fredkin_lut` (`gate_in` / `gate_out`);
- `fg_adder5` (`add5_*`);
- `fg_adder_synth` (`addsyn_*`);
- `fg_adder_bidir` (`addbd_*`).

Synthesis reports some outputs as wired straight to inputs. This is the
design's intent, not a fault: F1 of the gate is C, and the adders pass p and
q through.

## Verification

Each testbench drives one step per clock cycle of a testbench-only clock. It
compares the outputs with values it computes on its own: the truth table
above written as constants, p + q + r as an integer, and the garbage formula.
Each testbench has a watchdog and ends with a `TB_RESULT checks=N failures=M`
line.

- `tb_fredkin_lut` runs all 8 rows. It checks that each row keeps its number
  of ones and that no output word repeats. It also replays eight reference
  cases from a transistor-level simulation of the cell. Finally it uses the
  gate as AND, OR and NOT on all operand values.
- `tb_fredkin_lut_bidir` covers all 8 words forward and all 8 back, that the
  idle side stays at zero, and 200 random forward-then-back round trips.
- `tb_fg_adder5` and `tb_fg_adder_synth` cover all 8 additions, check that
  the outputs are all different, and add 64 random additions.
- `tb_fg_adder_bidir` covers all 8 additions forward and their 8 roll-backs.
  It also checks the sum = carry = 1 example and that all 32 five-bit words
  map one-to-one and come back unchanged.
- `tb_fredkin_top` runs 1000 random cycles on every instance. The two-mode
  adder alternates between forward and back in runs of random length. The
  testbench counts gate swaps, gate passes, carries, forward operations, back
  operations and mode switches. Any of these that never happens counts as a
  failure. The top has no parameters, so this is also the full-size run.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fredkin_pkg.sv tb/tb_fredkin_top.sv --top-module tb_fredkin_top
./obj_dir/Vtb_fredkin_top
```

For another block, use its testbench in place of `tb_fredkin_top`.

## What is modelled and what is not

- The cells model the **logic** of the transistor circuits, not their
  electrical behaviour. Not modelled: signal restoration, pass-transistor
  threshold loss, delay, and the energy argument behind reversible logic.
- The **two-mode gate** departs from the transistor circuit as described
  above: split terminals, one mode bit instead of separate Forward and Back
  nets, zeros on the idle side, and a switch network copied per direction.
- **Wiring of the back-running adder.** It is built the natural way, with
  every gate of the derived chain in the same mode. No published wiring for it
  is reproduced.
- **Not included:**
  - The Toffoli gate. It appears only as background for comparison.
  - Any circuit-level measure, such as transistor counts, area or delay.
  - The fault-tolerance checking and the adiabatic (charge-recovering) power
    supply that the gate is meant to allow later.
