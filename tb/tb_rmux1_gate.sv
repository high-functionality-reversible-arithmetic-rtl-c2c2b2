// tb_rmux1_gate: exhaustive self-checking test of the RMUX1 gate.
// All eight inputs are applied. P must copy the select A. Q must be B when
// A = 0 and C when A = 1 (the multiplexer). R must carry the other data
// input. The eight outputs must all differ (reversibility).
module tb_rmux1_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  rmux1_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      check(p == a, "P = select");
      case (a)
        1'b0: check(q == b && r == c, "select 0 picks B");
        1'b1: check(q == c && r == b, "select 1 picks C");
      endcase
      check(!seen[{p, q, r}], "outputs one to one");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
