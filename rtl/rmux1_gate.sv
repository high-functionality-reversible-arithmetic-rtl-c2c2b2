// rmux1_gate: the 3x3 RMUX1 reversible 2:1 multiplexer gate.
//
// Function: P = A, Q = A'B + AC, R = A'C + AB. A is the select line. Q is
// the multiplexer output: B when A = 0 and C when A = 1. R carries the input
// that was not selected, which keeps the mapping one to one. It is the
// Fredkin function with a different pairing of inputs and outputs.
// The ALU uses three of these gates:
//   (1) select S3 chooses F1 (S3 = 0) or F2 (S3 = 1) and puts it on T3;
//   (2) select S4 chooses T3 (S4 = 0) or F3 (S4 = 1) and puts it on T4;
//   (3) select AL chooses FuncL (AL = 0) or FuncA (AL = 1) and puts it on Func.
// Purely combinational; quantum cost 4.
module rmux1_gate (
  input  logic a,   // select line
  input  logic b,   // data input chosen when a = 0
  input  logic c,   // data input chosen when a = 1
  output logic p,   // = a
  output logic q,   // multiplexer output
  output logic r    // the input that was not chosen
);
  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (~a & c) | (a & b);
  end
endmodule
