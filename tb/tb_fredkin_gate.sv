// tb_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
// All eight inputs are applied. P must copy A. With A = 0, B and C pass
// straight through. With A = 1, they are swapped. The eight outputs must
// all differ (reversibility). The ALU's use is checked as well: Q is the
// adder's carry-in, T5 when S5 = 0 and Cin when S5 = 1.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (a=%0b b=%0b c=%0b -> %0b%0b%0b)", what, a, b, c, p, q, r);
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
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a, "P = A");
      if (a == 1'b0) check({q, r} == {b, c}, "pass when A = 0");
      else           check({q, r} == {c, b}, "swap when A = 1");
      check(!seen[{p, q, r}], "outputs one to one");
      seen[{p, q, r}] = 1'b1;
    end
    // Carry-in selection in the ALU: S5 = 0 -> T5, S5 = 1 -> Cin/Bin.
    a = 1'b0; b = 1'b1; c = 1'b0; #1; check(q == 1'b1, "S5=0 passes T5");
    a = 1'b1; b = 1'b1; c = 1'b0; #1; check(q == 1'b0, "S5=1 passes Cin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
