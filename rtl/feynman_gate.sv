// feynman_gate: the 2x2 Feynman (controlled-NOT) reversible gate.
//
// Function: P = A, Q = A xor B. With B held at 0 the gate copies A onto Q,
// so reversible circuits use it to fan a signal out to two consumers. The
// ALU uses it that way: it copies the selected logic result T4 onto T5 (the
// line that feeds the arithmetic half) and FuncL (the logic result).
// Purely combinational; quantum cost 1.
module feynman_gate (
  input  logic a,   // control line
  input  logic b,   // target line
  output logic p,   // = a
  output logic q    // = a ^ b
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
