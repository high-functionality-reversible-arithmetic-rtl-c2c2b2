// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
// All four inputs are applied. P must copy A. Q must be B inverted
// when A is 1 and B otherwise. With B = 0, Q must be a copy of A (the
// fan-out use). The four outputs must all differ (reversibility).
// A watchdog ends the run if it hangs.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (a=%0b b=%0b p=%0b q=%0b)", what, a, b, p, q);
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
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check(p == a, "P = A");
      check(q == (a ? ~b : b), "Q = B, inverted when A = 1");
      if (!b) check(q == a, "fan-out copy with B = 0");
      check(!seen[{p, q}], "outputs one to one");
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
