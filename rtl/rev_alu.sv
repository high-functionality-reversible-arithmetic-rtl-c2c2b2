// rev_alu: a 1-bit reversible arithmetic logic unit with 35 operations.
//
// The ALU has seven reversible gates with a total quantum cost of 33. It
// maps 12 input lines one to one onto 12 output lines. The input lines are
// A, B, Cin/Bin, one ancilla (held at 0), the selects S0..S5 and the controls
// AS and AL. The output lines are the result Func, the carry/borrow out
// Cout/Bout, and ten garbage lines G1..G10 that exist only to keep the
// mapping reversible.
//
// Data flow:
//   FTRA gate     A, B, S2, S1, S0 -> T1 (=A), T2 (=B), F1, F2, F3.
//                 F1: xor/xnor family, F2: and/or/nand/nor family,
//                 F3: implication and comparison family.
//   RMUX1 (1)     S3 picks F1 or F2                  -> T3   (garbage G1, G2)
//   RMUX1 (2)     S4 picks T3 or F3                  -> T4   (garbage G3, G4)
//   Feynman       copies T4 (target = ancilla)       -> T5, FuncL
//   Fredkin       S5 picks T5 or Cin/Bin             -> T6   (garbage G5, G6)
//   WG            T1 + T2 + T6 (AS = 0), or
//                 T1 - T2 - T6 (AS = 1)              -> FuncA, Cout/Bout
//                                                       (garbage G7, G8)
//   RMUX1 (3)     AL picks FuncL or FuncA            -> Func (garbage G9, G10)
//
// With AL = 0, Func is one of 13 logic functions of A and B. With AL = 1,
// Func is the sum or difference bit. The carry/borrow into the adder is
// Cin/Bin when S5 = 1. When S5 = 0 it is the logic result, which gives the
// "A plus B plus f(A,B)" and "A minus B minus f(A,B)" operations.
// Cout/Bout is the WG gate's carry/borrow output whatever AL is.
//
// The gates, their equations, the wiring and the garbage numbering follow
// the published circuit. This design's own choices are the order of the
// garbage lines within each gate and the ancilla brought out as a port.
// Each gate's unused outputs go out in output order: the pass-through line
// first, then the unchosen data line.
// Five garbage lines (G1, G3, G5, G7, G9) are copies of the select
// or operand inputs of their gates (S3, S4, S5, A and AL). Synthesis sees
// them as wires from inputs to outputs. They are kept deliberately: a
// reversible gate passes its control line through, and dropping these lines
// would break the one-to-one mapping of the 12 lines.
// The ALU is purely combinational: outputs follow the inputs after
// the delay of the gate chain, with no clock and no reset.
module rev_alu
  import rev_alu_pkg::*;
(
  input  logic     a,        // operand A
  input  logic     b,        // operand B
  input  logic     cin,      // carry in (add) / borrow in (subtract)
  input  logic     ancilla,  // constant line, 0 for ALU operation
  input  logic [5:0] s,      // select lines S5..S0
  input  logic     as_ctl,   // AS: 0 add, 1 subtract
  input  logic     al_ctl,   // AL: 0 logic result, 1 arithmetic result
  output logic     func,     // Func: selected result
  output logic     cout,     // Cout/Bout: carry or borrow out
  output garbage_t garbage   // G1..G10
);

  // Reversibility needs as many output lines as input lines.
  if ($bits({a, b, cin, ancilla, s, as_ctl, al_ctl}) != N_LINES ||
      $bits({func, cout, garbage}) != N_LINES || $bits(ancilla) != N_ANCILLA) begin : g_line_check
    $error("rev_alu: line counts do not match a %0d-line reversible circuit", N_LINES);
  end

  logic t1, t2, f1, f2, f3;
  logic t3, t4, t5, func_l, t6, func_a;

  // Logic unit: the FTRA gate produces three candidate functions.
  ftra_gate u_ftra (
    .a(a), .b(b), .c(s[2]), .d(s[1]), .e(s[0]),
    .p(t1), .q(t2), .r(f1), .s(f2), .t(f3)
  );

  // RMUX1 (1): S3 chooses between F1 and F2.
  rmux1_gate u_rmux1_1 (
    .a(s[3]), .b(f1), .c(f2),
    .p(garbage[1]), .q(t3), .r(garbage[2])
  );

  // RMUX1 (2): S4 chooses between T3 and F3.
  rmux1_gate u_rmux1_2 (
    .a(s[4]), .b(t3), .c(f3),
    .p(garbage[3]), .q(t4), .r(garbage[4])
  );

  // Feynman gate: fans T4 out to T5 and the logic result FuncL.
  feynman_gate u_feynman (
    .a(t4), .b(ancilla),
    .p(t5), .q(func_l)
  );

  // Fredkin gate: S5 chooses the adder's carry/borrow in, T5 or Cin/Bin.
  fredkin_gate u_fredkin (
    .a(s[5]), .b(t5), .c(cin),
    .p(garbage[5]), .q(t6), .r(garbage[6])
  );

  // Arithmetic unit: WG full adder (AS = 0) / full subtractor (AS = 1).
  wg_gate u_wg (
    .a(t1), .b(t2), .c(t6), .d(as_ctl),
    .p(garbage[7]), .q(garbage[8]), .r(func_a), .s(cout)
  );

  // RMUX1 (3): AL chooses the logic or the arithmetic result.
  rmux1_gate u_rmux1_3 (
    .a(al_ctl), .b(func_l), .c(func_a),
    .p(garbage[9]), .q(func), .r(garbage[10])
  );

endmodule
