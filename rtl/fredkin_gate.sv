// fredkin_gate: the 3x3 Fredkin (controlled-swap) reversible gate.
//
// Function: P = A, Q = A'B xor AC, R = A'C xor AB. When A is 0, B passes to
// Q and C passes to R. When A is 1, the two lines are swapped. In the ALU,
// A is the select line S5, B is the logic result T5 and C is the external
// carry/borrow input. Q is then the carry/borrow T6 that goes into the adder
// gate (T5 when S5 = 0, Cin/Bin when S5 = 1). The two product terms never
// both hold, so the xor is written here as an or of the two cases.
// Purely combinational; quantum cost 5.
module fredkin_gate (
  input  logic a,   // control (swap) line
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // = a ? c : b
  output logic r    // = a ? b : c
);
  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (~a & c) | (a & b);
  end
endmodule
