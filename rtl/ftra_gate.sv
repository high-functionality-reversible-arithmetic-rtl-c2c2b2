// ftra_gate: the 5x5 FTRA (fault tolerant reversible adder) gate, used as
// the logic unit of the ALU.
//
// Function, with X = (A xor B)(C xor D):
//   P = A
//   Q = B
//   R = A xor B xor C xor D
//   S = X xor (AB xor D)
//   T = X xor (A'B xor D) xor E
// In the ALU, A and B are the operands and C, D, E are the select lines
// S2, S1, S0. R, S and T are the logic results F1, F2 and F3:
//   S2 S1 S0 | F1        F2    F3
//    0  0  0 | A xor B   AB    A'B   (A < B)
//    0  0  1 | A xor B   AB    A + B'
//    0  1  0 | A xnor B  NOR   A' + B
//    0  1  1 | A xnor B  NOR   AB'   (A > B)
//    1  0  0 | A xnor B  OR    AB'         (F1 read as A = B)
//    1  0  1 | A xnor B  OR    A' + B
//    1  1  0 | A xor B   NAND  A + B'
//    1  1  1 | A xor B   NAND  A'B
// The equations give the rows 101 and 110 too. The ALU's operation table
// does not use them.
// Purely combinational; quantum cost 8.
module ftra_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,   // = a
  output logic q,   // = b
  output logic r,   // F1
  output logic s,   // F2
  output logic t    // F3
);
  logic x;
  always_comb begin
    x = (a ^ b) & (c ^ d);
    p = a;
    q = b;
    r = a ^ b ^ c ^ d;
    s = x ^ ((a & b) ^ d);
    t = x ^ ((~a & b) ^ d) ^ e;
  end
endmodule
