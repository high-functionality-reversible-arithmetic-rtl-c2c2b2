# A 1-bit reversible ALU with 35 operations

This is a one-bit arithmetic logic unit built only from *reversible* gates.
Each gate maps its input lines one to one onto the same number of output
lines. The whole ALU maps 12 input lines onto 12 output lines, so its inputs
can always be recovered from its outputs. This is the property reversible
(and quantum) logic relies on to avoid the energy lost when information is
erased. The cost of such a circuit is measured in gates, in *quantum cost*
(elementary controlled-NOT / controlled-V operations), in *ancilla* inputs
(lines that must be held at a constant) and in *garbage* outputs (lines that
exist only to keep the mapping reversible). This design uses:

| gates | quantum cost | ancilla inputs | garbage outputs | operations |
|-------|--------------|----------------|-----------------|------------|
| 7     | 33           | 1              | 10              | 13 logic + 22 arithmetic |

The RTL models each gate's Boolean function and the gates' wiring. It is
synthesizable, purely combinational logic with no clock or reset. It says
nothing about any quantum or adiabatic implementation. Synthesizing it to a
standard-cell library gives ordinary irreversible logic with the same truth
table.

## The gates

| module         | lines | function | quantum cost |
|----------------|-------|----------|--------------|
| `feynman_gate` | 2 | P = A, Q = A ⊕ B | 1 |
| `fredkin_gate` | 3 | P = A, Q = A'B ⊕ AC, R = A'C ⊕ AB (swap B and C when A = 1) | 5 |
| `rmux1_gate`   | 3 | P = A, Q = A'B + AC (2:1 mux), R = A'C + AB (the unchosen input) | 4 |
| `wg_gate`      | 4 | P = A, Q = A ⊕ B ⊕ D, R = A ⊕ B ⊕ C, S = (A ⊕ D)(B + C) + BC | 7 |
| `ftra_gate`    | 5 | P = A, Q = B, R = A ⊕ B ⊕ C ⊕ D, S = X ⊕ AB ⊕ D, T = X ⊕ A'B ⊕ D ⊕ E, with X = (A ⊕ B)(C ⊕ D) | 8 |

Two of these do the real work:

* **WG** is a full adder when D = 0 (R = sum, S = majority carry) and a full
  subtractor when D = 1 (R = difference, S = A'B + A'C + BC = borrow).
* **FTRA** ("fault tolerant reversible adder") is used here as a logic
  unit, not as an adder. With the select lines S2, S1, S0 on C, D, E, its
  three outputs give three families of two-input functions:

| S2 S1 S0 | F1 (R) | F2 (S) | F3 (T) |
|----------|--------|--------|--------|
| 000 | A ⊕ B  | AB         | A'B (A < B) |
| 001 | A ⊕ B  | AB         | A + B'  |
| 010 | A ⊙ B  | (A + B)'   | A' + B  |
| 011 | A ⊙ B  | (A + B)'   | AB' (A > B) |
| 100 | A ⊙ B (A = B) | A + B | AB'  |
| 101 | A ⊙ B  | A + B      | A' + B  |
| 110 | A ⊕ B  | (AB)'      | A + B'  |
| 111 | A ⊕ B  | (AB)'      | A'B     |

Rows 101 and 110 follow from the equations. The operation table below does not use them.

## How the ALU is wired (`rev_alu`)

```
 A,B,S2,S1,S0 -> FTRA -> T1=A, T2=B, F1, F2, F3
 S3: RMUX1(1)  picks F1 (0) / F2 (1)      -> T3        garbage G1, G2
 S4: RMUX1(2)  picks T3 (0) / F3 (1)      -> T4        garbage G3, G4
 Feynman(T4, ancilla=0)                   -> T5, FuncL   (fan-out copy)
 S5: Fredkin   picks T5 (0) / Cin (1)     -> T6        garbage G5, G6
 AS: WG(T1, T2, T6)  add (0) / sub (1)    -> FuncA, Cout/Bout   garbage G7, G8
 AL: RMUX1(3)  picks FuncL (0) / FuncA (1) -> Func      garbage G9, G10
```

Reversible logic cannot fan a signal out with a plain wire. So the selected
logic result T4 is copied by a Feynman gate whose target is the single ancilla
line. One copy (FuncL) is the logic result. The other (T5) can become the
carry into the adder.

The unusual feature is the Fredkin gate in front of the adder. When S5 = 1
the adder sees the external Cin/Bin, and the ALU is an ordinary full
adder/subtractor. When S5 = 0 the adder's carry/borrow input is the logic
result itself. This gives twenty more operations of the form
"A plus B plus f(A,B)" and "A minus B minus f(A,B)". That is where most of the
35 operations come from.

### Operation table

Logic results use AL = 0 (S5 and AS don't care). "*" is a don't care.

| S4 S3 S2 S1 S0 | logic (AL=0) | AL=1, S5=0, AS=0 | AL=1, S5=0, AS=1 |
|----------------|--------------|------------------|------------------|
| 0 0 0 0 1 | A ⊕ B      | A + B + (A ⊕ B)  | A − B − (A ⊕ B) |
| 0 1 0 0 1 | AB         | A + B + AB       | A − B − AB |
| 1 * 0 0 1 | A + B'     | A + B + (A + B') | A − B − (A + B') |
| 0 0 0 1 0 | A ⊙ B      | A + B + (A ⊙ B)  | A − B − (A ⊙ B) |
| 0 1 0 1 0 | (A + B)'   | A + B + A'B'     | A − B − A'B' |
| 1 * 0 1 0 | A' + B     | A + B + (A' + B) | A − B − (A' + B) |
| 0 1 1 0 0 | A + B      | A + B + (A + B)  | A − B − (A + B) |
| 1 * 1 0 0 | AB'        | A + B + AB'      | A − B − AB' |
| 0 1 1 1 1 | (AB)'      | A + B + (AB)'    | A − B − (AB)' |
| 1 * 1 1 1 | A'B        | A + B + A'B      | A − B − A'B |
| 1 * 0 1 1 | A > B      |                  |  |
| 0 0 1 0 0 | A = B      |                  |  |
| 1 * 0 0 0 | A < B      |                  |  |
| * * * * * (S5=1) |     | A + B + Cin      | A − B − Bin |

In the arithmetic columns "+" and "−" are one-bit arithmetic: Func is the
sum/difference bit and `cout` the carry/borrow. `cout` is the WG gate's
output in every mode, so it is meaningless when AL = 0.

## Ports of `rev_alu`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | 1 | operands |
| `cin` | in | 1 | carry in (add) or borrow in (subtract), used when S5 = 1 |
| `ancilla` | in | 1 | constant line; **tie to 0**. A 1 inverts the logic result FuncL (not T5) |
| `s` | in | 6 | S5..S0 (`s[0]` = S0) |
| `as_ctl` | in | 1 | AS: 0 add, 1 subtract |
| `al_ctl` | in | 1 | AL: 0 logic result, 1 arithmetic result |
| `func` | out | 1 | result |
| `cout` | out | 1 | carry / borrow out |
| `garbage` | out | 10 | G1..G10 (`garbage[1]` = G1) |

The ancilla is a port rather than a constant so that the full 12-line
reversible mapping can be exercised. In a system, tie it to 0 and leave the
garbage outputs open. Five garbage lines (G1, G3, G5, G7, G9) are direct
copies of S3, S4, S5, A and AL. They pass each gate's control line through,
as reversible gates do.

## Where this RTL makes its own choices

* **Garbage numbering inside a gate.** Which output of each multiplexing gate
  is G1 and which is G2 (and so on) is a choice. The pass-through line P is
  the lower-numbered garbage line and the unchosen data line R the higher one.
  For the Fredkin gate, the controlled-swap output carrying the selected carry
  is T6, and the other two are G5 (= S5) and G6.
* **Known disagreement with a published reference point.** One published
  simulation point is A=1, B=0, Cin=1, S2..S0=111, S3=1, S4=0, S5=1, AS=0,
  AL=1. This RTL reproduces its Func=0, Cout/Bout=1 and the values it shows for
  G1, G3–G9. The reference shows G2=0. By the gate equations, G2 is the
  unchosen RMUX1(1) input F1 = A ⊕ B ⊕ S2 ⊕ S1 = 1, and the RTL follows the
  equations.
* **Gate equations, not quantum circuits.** Each gate is written as its
  Boolean function. The controlled-V decompositions behind the quantum costs
  are not modelled.
* **One bit only.** No multi-bit version or carry chain is defined. Slices
  could be chained through `cin`/`cout` in the S5 = 1 modes, but this design
  does not do that.

## Files

| file | contents |
|------|----------|
| `rtl/rev_alu_pkg.sv` | quantum costs, line counts, the garbage bus type |
| `rtl/ftra_gate.sv`, `rtl/rmux1_gate.sv`, `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/wg_gate.sv` | the five gate types |
| `rtl/rev_alu.sv` | the ALU (top) |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## Verification

Each gate's testbench applies every input combination. It checks the
outputs against a reference written independently of the gate equations:
named logic functions, mux behaviour, and integer sums and differences for
WG. It also checks that the outputs are one to one.

`tb_rev_alu` tests the ALU as it is (it has no parameters):

* each of the 35 operations, for every operand and carry value, against
  its name or against integer arithmetic;
* all 4096 values of the 12 input lines, against a behavioural model. The
  4096 output vectors must all differ, which checks that the ALU is reversible;
* the reference point above;
* counts of each mechanism: logic result, add/subtract with the logic result
  as carry, add/subtract with the external carry, carry out, borrow out, and
  ancilla set. A mechanism that never occurs is a failure.

It makes 9084 checks and finishes in milliseconds. Every testbench prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

Running a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rev_alu_pkg.sv \
    rtl/ftra_gate.sv rtl/rmux1_gate.sv rtl/feynman_gate.sv rtl/fredkin_gate.sv \
    rtl/wg_gate.sv rtl/rev_alu.sv tb/tb_rev_alu.sv --top-module tb_rev_alu
./obj_dir/Vtb_rev_alu
```

For a single gate, list the package, the gate and its testbench
(for example `rtl/rev_alu_pkg.sv rtl/wg_gate.sv tb/tb_wg_gate.sv
--top-module tb_wg_gate`).
