// tb_wg_gate: exhaustive self-checking test of the WG adder/subtractor gate.
// All sixteen inputs are applied. The expected sum, difference, carry and
// borrow are worked out with integer arithmetic:
//   D = 0: A + B + C = 2*S + R  (full adder)
//   D = 1: A - B - C = R - 2*S  (full subtractor)
// P must copy A and Q must be A xor B xor D. The sixteen outputs must all
// differ (reversibility).
module tb_wg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  wg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b)",
               what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      if (!d) begin
        total = int'(a) + int'(b) + int'(c);
        check(2 * int'(s) + int'(r) == total, "full adder");
      end else begin
        total = int'(a) - int'(b) - int'(c);
        check(int'(r) - 2 * int'(s) == total, "full subtractor");
      end
      check(p == a, "P = A");
      check(q == (a ^ b ^ d), "Q = A xor B xor D");
      check(!seen[{p, q, r, s}], "outputs one to one");
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
