// wg_gate: the 4x4 WG reversible full adder/subtractor gate.
//
// Function:
//   P = A
//   Q = A xor B xor D
//   R = A xor B xor C
//   S = (A xor D)(B + C) + BC
// R is the sum (and the difference) of A, B and C. D picks the operation.
// With D = 0, S = AB + AC + BC, which is the carry out of A plus B plus C.
// With D = 1, S = A'B + A'C + BC, which is the borrow out of A minus B minus C.
// In the ALU, A and B are the operands, C is the carry/borrow T6 from the
// Fredkin gate and D is the control line AS. R is FuncA and S is Cout/Bout.
// Purely combinational; quantum cost 7.
module wg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,   // 0: add, 1: subtract
  output logic p,   // = a
  output logic q,   // = a ^ b ^ d
  output logic r,   // sum / difference
  output logic s    // carry / borrow out
);
  always_comb begin
    p = a;
    q = a ^ b ^ d;
    r = a ^ b ^ c;
    s = ((a ^ d) & (b | c)) | (b & c);
  end
endmodule
