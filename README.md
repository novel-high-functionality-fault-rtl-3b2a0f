# A one-bit, forty-operation ALU built from reversible gates

This is a one-bit arithmetic and logic unit made only of reversible gates:
four Double Feynman gates, six Fredkin gates and one five-input FTRA adder
cell. Each gate has as many outputs as inputs, and its input vector can be
recovered from its output vector. The Fredkin and Double Feynman gates also
preserve parity: the XOR of a gate's outputs equals the XOR of its inputs.
That is the basis of the fault-tolerance argument: a single wrong line
inside such a gate flips the parity, so a parity check can detect it. There
is no clock, decoder or register. Fourteen select lines, S0 to S13, steer
fixed wiring so that the FTRA cell sees the operands of the chosen
operation. One result bit comes out on `func`. Every gate output that is not
passed on becomes one of twenty "garbage" lines, G1 to G20. The only
constant inputs are four zeros.

The RTL models the gates as ordinary combinational logic: each gate is a
module that evaluates its equations. The models are synthesizable, but a
synthesizer will not keep the reversible structure. Their use is to check
the gate network and its operation tables.

## The three gates

| gate | inputs | outputs | used here as |
|---|---|---|---|
| Double Feynman (`double_feynman_gate`) | A, B, C | P = A, Q = A^B, R = A^C | controlled inverter; fan-out copier |
| Fredkin (`fredkin_gate`) | A, B, C | P = A, Q = A ? C : B, R = A ? B : C | 2:1 multiplexer; AND/OR cell |
| FTRA (`ftra_gate`) | A, B, C, D, E | P = A, Q = B, R = A^B^C^D, S = (A^B)(C^D) ^ AB ^ D, T = (A^B)(C^D) ^ ~A·B ^ D ^ E | full adder / full subtractor / logic |

A Fredkin gate with its third input used as a mode bit M computes
Q = ~A&B when M = 0 and Q = A|B when M = 1. Fredkin gate 3 uses this to
form the third operand of the arithmetic operations.

The FTRA cell has three modes:
- **Full adder.** The addend goes on C, with D = E = 0. R is the sum and S is the carry.
- **Full subtractor.** The borrow-in goes on D, with C = E = 0. It computes A − B − D: R is the difference and T is the borrow.
- **Logic.** Constants go on C, D and E. R gives XOR, XNOR, A or ~A. S gives AND, OR, NAND or NOR. T gives A|~B, ~A|B, A&~B or ~A&B. E only inverts T.

The equations of P, Q, R and T follow the published gate. The carry
equation S is this design's own: it is the simplest one that gives the
carry in adder mode and the four S-line logic functions the operation table
needs. See "Where the design needs care" about parity.

## The datapath

```
 DFG1 (S0, B, 0)      -> G1, T1 = B^S0, G2
 FG1  (S1, S2, T1)    -> G3, T2 = S1 ? T1 : S2, G4     T2 = 0, 1, B or ~B  -> FTRA B
 DFG2 (S3, B, 0)      -> G5, T3 = B^S3, G6
 FG2  (S4, S5, T3)    -> G7, T4 = S4 ? T3 : S5, G8     T4 = 0, 1, B or ~B
 DFG3 (A, S6, S7)     -> T5 = A, T6 = A^S6, G9         T5 -> FTRA A
 DFG4 (S8, 0, 0)      -> G12, T7 = S8, G13
 FG3  (T6, T4, T7)    -> G10, T8, G11                  T8 = S8 ? T6|T4 : ~T6&T4
 FG4  (S9, T8, S10)   -> G14, T9, T10                  S9=0: T9=T8, T10=S10
                                                       S9=1: T9=S10, T10=T8
 FTRA (T5, T2, T9, T10, S11) -> G15, G16, F1, F2, F3
 FG5  (S12, F1, F2)   -> G17, func1 = S12 ? F2 : F1, G18
 FG6  (S13, func1, F3)-> G19, func = S13 ? F3 : func1, G20
```

Each part has one job:
- **Operand X.** DFG1 and FG1 choose what the FTRA sees as its B operand: 0, 1, B or ~B.
- **Operand Y.** DFG2, FG2, DFG3, DFG4 and FG3 build a third operand from A and B: 0, A, AB, A~B, ~AB, A|B or A|~B. In logic mode Y is simply the constant S5.
- **Add or subtract.** FG4 decides where Y enters the FTRA. On C (S9 = 0) it is an addend. On D (S9 = 1) it is a borrow-in.
- **Result select.** FG5 and FG6 pick which FTRA output appears on `func`: F1 (R), F2 (S) or F3 (T).

**Carry and borrow.** In every arithmetic operation S12 = S13 = 0, so the
third outputs of FG5 and FG6 carry the FTRA's S and T lines:
- G18 is the carry in set 1 (additions).
- G20 is the borrow in set 2 (subtractions).

The design uses these two garbage lines as its carry and borrow outputs.
The ALU has no carry input: the third operand comes from FG3, not from a
neighbouring bit.

## The forty operations

`ft_alu_pkg::op_select(op)` returns the select word of each operation in
`ft_op_e`. Select lines the tables mark "don't care" are driven to 0.

**Logic (12).** S4 = S6 = S7 = S9 = 0. S3 is don't care.

| lines set to 1 | func |
|---|---|
| S1 S11 | A XOR B |
| S1 S11 S12 | A AND B |
| S1 S11 S13 | A + ~B |
| S1 S10 | A XNOR B |
| S1 S10 S12 | A NOR B |
| S1 S10 S13 | ~A + B |
| S1 S5 S8 S12 | A OR B |
| S1 S5 S8 S13 | A·~B |
| S1 S5 S8 S10 S11 S12 | A NAND B |
| S1 S5 S8 S10 S11 S13 | ~A·B |
| S11 | A |
| S2 S11 | ~A |

**Arithmetic (14 × 2).** S10 to S13 = 0. S9 = 0 gives A + X + Y (set 1);
S9 = 1 gives A − X − Y (set 2).

| lines set to 1 (besides S9) | X | Y |
|---|---|---|
| S3 S4 S6 S7 | 0 | A·~B |
| S0 S1 S4 S6 S7 | ~B | A·B |
| S1 S3 S4 S6 S7 | B | A·~B |
| S1 | B | 0 |
| S0 S1 | ~B | 0 |
| S4 S6 S7 | 0 | A·B |
| S0 S1 S8 | ~B | A |
| S1 S8 | B | A |
| S4 | 0 | ~A·B |
| S1 S4 | B | ~A·B |
| S0 S1 S4 | ~B | ~A·B |
| S4 S8 | 0 | A + B |
| S3 S4 S8 | 0 | A + ~B |
| S8 | 0 | A |

## Where the design needs care

- **The FTRA cell does not preserve parity.** The published gate is
  described as parity preserving. But with its R and T equations and a
  carry on S, the XOR of its outputs equals the XOR of its inputs XOR A.
  No choice of S can fix this: at C = D = E = 0 the carry must be AB, and
  then R^S^T = A. The ten Fredkin and Double Feynman gates do preserve
  parity, and their testbenches check it. A parity-based fault checker
  around the whole ALU would therefore have to allow for the FTRA cell.
- **Fredkin gate 2.** S4 is its control and S5 its constant input. The
  published text also names S3 as this gate's select line. S4 is the choice
  that agrees with the operation tables, since S5 is don't care whenever
  S4 = 1.
- **Unspecified S combinations.** The carry equation fixes the FTRA's S
  line for the three (C, D, E) settings no operation uses (101, 011, 110).
  A different carry equation could give other values there; no listed
  operation depends on them.
- **No fault checker.** The design gives fault tolerance only through its
  parity-preserving gates. No parity generator or checker is described, so
  none is built.

## Interface and timing

`ft_alu` (top):
- inputs `a`, `b`, and `sel` (`ft_alu_sel_t`, a packed struct where bit i is Si)
- outputs `func` and `g[20:1]` (the garbage lines, named as above)

It is purely combinational: no clock, no reset, no state. Many garbage
lines are plain copies of select inputs, so synthesis reports them as idle
outputs.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
- **`tb_double_feynman_gate`, `tb_fredkin_gate`.** They try all inputs
  against the gate written as controlled inversion or controlled swap. They
  also check parity preservation (and conservation of ones, for Fredkin)
  and that all output vectors are distinct.
- **`tb_ftra_gate`.** It tries all 32 inputs and checks: full adder and
  full subtractor against integer arithmetic, the twelve logic functions,
  and reversibility.
- **`tb_ft_alu`.** It runs all 40 operations for all four (A, B) pairs. The
  expected results come from each operation's meaning: the logic function,
  or the integer A ± X ± Y with its carry or borrow. It then repeats each
  vector with the don't-care lines randomised. It also applies the
  published waveform's cursor vector: A = B = 0, S0 = S1 = S4 = 1, giving
  func = 1 and G10..G19 = 0000001000. For every vector it checks through
  the hierarchy that all ten Fredkin and Double Feynman instances preserve
  parity. It counts that each mechanism occurs
  at least once: carries, borrows, both FG3 modes, both FG4 routes, and
  each of F1, F2 and F3 on `func`.

To simulate with Verilator:

```
verilator --binary --timing -Irtl -y rtl rtl/ft_alu_pkg.sv tb/tb_ft_alu.sv --top-module tb_ft_alu
./obj_dir/Vtb_ft_alu
```

## Files

- `rtl/ft_alu_pkg.sv`: select-word type, operation enumeration, `op_select()`
- `rtl/double_feynman_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/ftra_gate.sv`: the gates
- `rtl/ft_alu.sv`: the gate network (top)
- `tb/tb_*.sv`: one testbench per module
