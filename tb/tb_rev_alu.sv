// tb_rev_alu: end-to-end self-checking test of the reversible ALU, run with
// the ALU exactly as it is (it has no parameters).
//
// Four parts:
//  1. Operation table. Each of the 13 logic operations (AL = 0) is checked
//     against its name. Each of the 22 arithmetic operations is checked
//     with integer arithmetic: A plus B plus f(A,B) and A minus B minus
//     f(A,B) for the ten functions f with S5 = 0, and A plus B plus Cin and
//     A minus B minus Bin with S5 = 1. Every operation's 2-bit result
//     {Cout/Bout, Func} is checked for all operand and carry values.
//  2. Exhaustive sweep over all 4096 values of the 12 input lines. Func,
//     Cout/Bout and the ten garbage lines are checked against a behavioural
//     model made of named functions and integer arithmetic.
//  3. Reversibility: the 4096 output vectors must all differ.
//  4. A reference point: A=1, B=0, Cin=1, S2..S0=111, S3=1, S4=0, S5=1,
//     AS=0, AL=1 must give Func=0 and Cout=1, with G1=1, G3=0, G4=0, G5=1,
//     G6=1, G7=1, G8=1 and G9=1.
// The test counts how often each mechanism occurs: logic result selected,
// add and subtract with the logic result as carry/borrow in, add and
// subtract with the external Cin/Bin, a carry out, a borrow out, and the
// ancilla line set to 1. A mechanism that never occurs counts as a failure.
// Every vector is held for 1 time unit. A watchdog ends a hung run.
module tb_rev_alu;
  import rev_alu_pkg::*;

  logic       a, b, cin, ancilla, as_ctl, al_ctl;
  logic [5:0] s;
  logic       func, cout;
  garbage_t   garbage;

  int checks = 0, failures = 0;

  rev_alu dut (
    .a(a), .b(b), .cin(cin), .ancilla(ancilla), .s(s),
    .as_ctl(as_ctl), .al_ctl(al_ctl),
    .func(func), .cout(cout), .garbage(garbage)
  );

  // --- Operation table: select code S4 S3 S2 S1 S0 and the logic function.
  typedef enum int {
    OP_XOR, OP_AND, OP_A_OR_NB, OP_XNOR, OP_NOR, OP_NA_OR_B, OP_OR, OP_A_AND_NB,
    OP_NAND, OP_NA_AND_B, OP_GT, OP_EQ, OP_LT
  } lop_e;
  localparam int N_LOP = 13;
  localparam logic [4:0] LOP_SEL [N_LOP] = '{
    5'b00001, 5'b01001, 5'b10001, 5'b00010, 5'b01010, 5'b10010, 5'b01100,
    5'b10100, 5'b01111, 5'b10111, 5'b10011, 5'b00100, 5'b10000
  };

  function automatic logic named_op(lop_e op, logic x, logic y);
    case (op)
      OP_XOR:      return x ^ y;
      OP_AND:      return x & y;
      OP_A_OR_NB:  return x | ~y;
      OP_XNOR:     return ~(x ^ y);
      OP_NOR:      return ~(x | y);
      OP_NA_OR_B:  return ~x | y;
      OP_OR:       return x | y;
      OP_A_AND_NB: return x & ~y;
      OP_NAND:     return ~(x & y);
      OP_NA_AND_B: return ~x & y;
      OP_GT:       return x > y;
      OP_EQ:       return x == y;
      default:     return x < y;
    endcase
  endfunction

  // --- Behavioural model of the whole ALU.
  // The three candidate logic results of the logic unit, by select code S2 S1 S0.
  function automatic logic [2:0] cand(logic [2:0] sel, logic x, logic y);
    case (sel)
      3'b000: return {x ^ y,    x & y,    x < y};
      3'b001: return {x ^ y,    x & y,    x | ~y};
      3'b010: return {~(x ^ y), ~(x | y), ~x | y};
      3'b011: return {~(x ^ y), ~(x | y), x > y};
      3'b100: return {x == y,   x | y,    x & ~y};
      3'b101: return {~(x ^ y), x | y,    ~x | y};
      3'b110: return {x ^ y,    ~(x & y), x | ~y};
      default: return {x ^ y,   ~(x & y), ~x & y};
    endcase
  endfunction

  typedef struct packed {
    logic     func;
    logic     cout;
    garbage_t g;
  } out_t;

  function automatic out_t model(logic x, logic y, logic ci_ext, logic anc,
                                 logic [5:0] sel, logic sub, logic arith);
    out_t o;
    logic [2:0] f;
    logic t3, t4, func_l, ci, func_a, co;
    int   total;
    f      = cand(sel[2:0], x, y);
    t3     = sel[3] ? f[1] : f[2];
    t4     = sel[4] ? f[0] : t3;
    func_l = t4 ^ anc;
    ci     = sel[5] ? ci_ext : t4;
    if (!sub) total = int'(x) + int'(y) + int'(ci);
    else      total = int'(x) - int'(y) - int'(ci);
    func_a = total[0];
    co     = sub ? (total < 0) : (total > 1);
    o.func  = arith ? func_a : func_l;
    o.cout  = co;
    o.g[1]  = sel[3];  o.g[2]  = sel[3] ? f[2] : f[1];
    o.g[3]  = sel[4];  o.g[4]  = sel[4] ? t3 : f[0];
    o.g[5]  = sel[5];  o.g[6]  = sel[5] ? t4 : ci_ext;
    o.g[7]  = x;       o.g[8]  = x ^ y ^ sub;
    o.g[9]  = arith;   o.g[10] = arith ? func_l : func_a;
    return o;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b cin=%0b anc=%0b s=%06b as=%0b al=%0b -> func=%0b cout=%0b g=%010b",
               what, a, b, cin, ancilla, s, as_ctl, al_ctl, func, cout, garbage);
    end
  endtask

  task automatic apply(logic x, logic y, logic ci_ext, logic anc,
                       logic [5:0] sel, logic sub, logic arith);
    {a, b, cin, ancilla, s, as_ctl, al_ctl} = {x, y, ci_ext, anc, sel, sub, arith};
    #1;
  endtask

  // Mechanism counters.
  int n_logic = 0, n_add_fn = 0, n_sub_fn = 0, n_add_cin = 0, n_sub_bin = 0;
  int n_carry = 0, n_borrow = 0, n_ancilla = 0, n_ops = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit   seen [4096];
    int   exp_total;
    out_t exp_o;

    check(QC_ALU == 33, "total quantum cost of the seven gates");

    // 1. Operation table: 13 logic operations.
    for (int k = 0; k < N_LOP; k++) begin
      for (int v = 0; v < 16; v++) begin
        logic [4:0] sel;
        sel = LOP_SEL[k];
        if (sel[4]) sel[3] = v[3];           // S3 is a don't care when S4 = 1
        apply(v[0], v[1], v[2], 1'b0, {v[3], sel}, 1'b0, 1'b0);
        check(func == named_op(lop_e'(k), v[0], v[1]), "logic operation");
        n_logic++;
      end
      n_ops++;
    end
    // 20 arithmetic operations with the logic result as carry/borrow in.
    for (int k = 0; k < 10; k++) begin
      for (int sub = 0; sub < 2; sub++) begin
        for (int v = 0; v < 8; v++) begin
          logic fn;
          logic [4:0] sel;
          sel = LOP_SEL[k];
          if (sel[4]) sel[3] = v[2];
          fn = named_op(lop_e'(k), v[0], v[1]);
          apply(v[0], v[1], 1'b0, 1'b0, {1'b0, sel}, sub[0], 1'b1);
          if (sub == 0) begin
            exp_total = int'(v[0]) + int'(v[1]) + int'(fn);
            check({cout, func} == 2'(exp_total), "A plus B plus f(A,B)");
            n_add_fn++;
            if (cout) n_carry++;
          end else begin
            exp_total = int'(v[0]) - int'(v[1]) - int'(fn);
            check(func == exp_total[0] && cout == (exp_total < 0), "A minus B minus f(A,B)");
            n_sub_fn++;
            if (cout) n_borrow++;
          end
        end
        n_ops++;
      end
    end
    // 2 arithmetic operations with the external carry/borrow in.
    for (int sub = 0; sub < 2; sub++) begin
      for (int v = 0; v < 256; v++) begin
        // operands, carry and the don't-care selects all varied
        apply(v[0], v[1], v[2], 1'b0, {1'b1, v[7:3]}, sub[0], 1'b1);
        if (sub == 0) begin
          exp_total = int'(v[0]) + int'(v[1]) + int'(v[2]);
          check({cout, func} == 2'(exp_total), "A plus B plus Cin");
          n_add_cin++;
          if (cout) n_carry++;
        end else begin
          exp_total = int'(v[0]) - int'(v[1]) - int'(v[2]);
          check(func == exp_total[0] && cout == (exp_total < 0), "A minus B minus Bin");
          n_sub_bin++;
          if (cout) n_borrow++;
        end
      end
      n_ops++;
    end
    check(n_ops == 35, "35 operations exercised");

    // 2 and 3. Exhaustive sweep against the model, and reversibility.
    for (int v = 0; v < 4096; v++) begin
      logic [11:0] w;
      out_t got;
      w = 12'(v);
      apply(w[0], w[1], w[2], w[3], w[9:4], w[10], w[11]);
      exp_o = model(w[0], w[1], w[2], w[3], w[9:4], w[10], w[11]);
      got   = '{func: func, cout: cout, g: garbage};
      check(got == exp_o, "full model");
      check(!seen[got], "outputs one to one");
      seen[got] = 1'b1;
      if (ancilla) n_ancilla++;
    end

    // 4. Reference point.
    apply(1'b1, 1'b0, 1'b1, 1'b0, 6'b101111, 1'b0, 1'b1);
    check(func == 1'b0 && cout == 1'b1, "reference point Func, Cout");
    check(garbage[1] == 1'b1 && garbage[3] == 1'b0 && garbage[4] == 1'b0 &&
          garbage[5] == 1'b1 && garbage[6] == 1'b1 && garbage[7] == 1'b1 &&
          garbage[8] == 1'b1 && garbage[9] == 1'b1, "reference point garbage");

    $display("mechanisms: logic=%0d add_fn=%0d sub_fn=%0d add_cin=%0d sub_bin=%0d carry_out=%0d borrow_out=%0d ancilla_set=%0d",
             n_logic, n_add_fn, n_sub_fn, n_add_cin, n_sub_bin, n_carry, n_borrow, n_ancilla);
    check(n_logic > 0,   "logic result selected");
    check(n_add_fn > 0,  "add with logic carry in");
    check(n_sub_fn > 0,  "subtract with logic borrow in");
    check(n_add_cin > 0, "add with Cin");
    check(n_sub_bin > 0, "subtract with Bin");
    check(n_carry > 0,   "carry out");
    check(n_borrow > 0,  "borrow out");
    check(n_ancilla > 0, "ancilla set to 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
