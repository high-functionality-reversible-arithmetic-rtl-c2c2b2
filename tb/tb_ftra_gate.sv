// tb_ftra_gate: exhaustive self-checking test of the FTRA gate as the
// ALU's logic unit.
// All 32 inputs are applied. The expected F1, F2 and F3 for each select
// code C D E (= S2 S1 S0) are written as named logic operations of A and B,
// not as the gate's equations:
//   CDE | F1    F2    F3
//   000 | xor   and   A<B
//   001 | xor   and   A+B'
//   010 | xnor  nor   A'+B
//   011 | xnor  nor   A>B
//   100 | A=B   or    AB'
//   101 | xnor  or    A'+B
//   110 | xor   nand  A+B'
//   111 | xor   nand  A'B
// P and Q must copy A and B. The 32 outputs must all differ (reversibility).
module tb_ftra_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;
  bit [31:0] seen;

  ftra_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e),
                 .p(p), .q(q), .r(r), .s(s), .t(t));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (ab=%0b%0b cde=%0b%0b%0b -> r s t=%0b %0b %0b)",
               what, a, b, c, d, e, r, s, t);
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
    logic ef1, ef2, ef3;
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, e} = 5'(i);
      #1;
      case ({c, d, e})
        3'b000: begin ef1 = a ^ b;    ef2 = a & b;     ef3 = (a < b);   end
        3'b001: begin ef1 = a ^ b;    ef2 = a & b;     ef3 = a | ~b;    end
        3'b010: begin ef1 = ~(a ^ b); ef2 = ~(a | b);  ef3 = ~a | b;    end
        3'b011: begin ef1 = ~(a ^ b); ef2 = ~(a | b);  ef3 = (a > b);   end
        3'b100: begin ef1 = (a == b); ef2 = a | b;     ef3 = a & ~b;    end
        3'b101: begin ef1 = ~(a ^ b); ef2 = a | b;     ef3 = ~a | b;    end
        3'b110: begin ef1 = a ^ b;    ef2 = ~(a & b);  ef3 = a | ~b;    end
        default: begin ef1 = a ^ b;   ef2 = ~(a & b);  ef3 = ~a & b;    end
      endcase
      check(p == a && q == b, "P, Q pass A, B");
      check(r == ef1, "F1");
      check(s == ef2, "F2");
      check(t == ef3, "F3");
      check(!seen[{p, q, r, s, t}], "outputs one to one");
      seen[{p, q, r, s, t}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
