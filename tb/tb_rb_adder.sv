// tb_rb_adder: end-to-end self-checking test of the N-digit RB adder at its
// default size (no parameter override).
//
// Stimulus: directed extremes (all +1, all -1, all zero in both zero codes,
// alternating signs) followed by random operands whose digits are drawn from
// all four codes, with random carry-in digits.
// Checks, per vector:
//  * x + y + cin = d + 2^N * cout, with all values computed from the digit
//    codes in the testbench (64-bit signed arithmetic);
//  * the complement carry-out rail;
//  * carry-propagation freedom: after changing one operand digit j, no sum
//    digit below j or above j+2 may change, nor cout when j < N-2;
//  * for operands whose zeros are all coded (0,0), every sum digit against
//    a digit-serial reference built from the modified addition rule (which
//    carry and intermediate sum a digit pair gets, given the pair below).
// Mechanism coverage, each must occur or it counts as a failure: every row
// of the addition case table (both zeros, +1 and -1 in either order, +1+1,
// -1-1, a single +1 or -1 with the lower carry hinting either sign), carry
// digits of -1, 0 and +1, a nonzero carry-out and a nonzero carry-in.
`timescale 1ns/1ps
module tb_rb_adder;
  import rb_pkg::*;

  localparam int N       = 16;  // must match the adder's default
  localparam int NRANDOM = 20000;
  localparam int NRULE   = 5000;

  logic [N-1:0] x_p, x_n, y_p, y_n, d_p, d_n;
  logic         cin_p, cin_n, cout_p, cout_n, cout_n_b;

  int checks   = 0;
  int failures = 0;

  // Coverage counters.
  int n_case [1:10];  // Table rows: 1 both zero, 2 +1/-1 pair, 3 +1+1, 4 -1-1,
                      // 5 single +1 hint 1, 6 single +1 hint 0,
                      // 7 single -1 hint 1, 8 single -1 hint 0,
                      // 9 zero coded (1,1), 10 zero coded (0,0)
  int n_carry_neg = 0, n_carry_zero = 0, n_carry_pos = 0;
  int n_cout_nz = 0, n_cin_nz = 0, n_locality = 0, n_rule = 0;

  rb_adder dut (.*);

  // Value of one digit from its two bits.
  function automatic int dv(logic p, logic n);
    return rb_value(rb_digit_t'({p, n}));
  endfunction

  function automatic longint num_value(logic [N-1:0] p, logic [N-1:0] n);
    longint v = 0;
    for (int i = 0; i < N; i++) v += longint'(dv(p[i], n[i])) <<< i;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: x=%h/%h y=%h/%h cin=%b%b d=%h/%h cout=%b%b",
                 what, x_p, x_n, y_p, y_n, cin_p, cin_n, d_p, d_n, cout_p, cout_n);
    end
  endtask

  // Classify the digits of the present operands for coverage. The sign hint
  // a digit receives is the minus bit of the carry from the digit below;
  // the testbench models it by the rule that defines it (the minus bit of
  // y_i when y_i is nonzero, else of x_i) and the carry value by the case
  // table, so no internal wire of the adder is read.
  task automatic cover_digits();
    bit hint = cin_n;
    for (int i = 0; i < N; i++) begin
      int xv, yv, cv;
      xv = dv(x_p[i], x_n[i]);
      yv = dv(y_p[i], y_n[i]);
      if (xv == 0 && yv == 0)                      n_case[1]++;
      if (xv + yv == 0 && xv != 0)                 n_case[2]++;
      if (xv == 1 && yv == 1)                      n_case[3]++;
      if (xv == -1 && yv == -1)                    n_case[4]++;
      if (xv + yv == 1 && xv * yv == 0)            n_case[hint ? 5 : 6]++;
      if (xv + yv == -1 && xv * yv == 0)           n_case[hint ? 7 : 8]++;
      if ((x_p[i] & x_n[i]) || (y_p[i] & y_n[i]))  n_case[9]++;
      if (!(x_p[i] | x_n[i]) || !(y_p[i] | y_n[i])) n_case[10]++;
      case (xv + yv)
        2, -2:   cv = (xv + yv) / 2;
        1:       cv = hint ? 0 : 1;
        -1:      cv = hint ? -1 : 0;
        default: cv = 0;
      endcase
      hint = (y_p[i] ^ y_n[i]) ? y_n[i] : x_n[i];
      if (cv < 0) n_carry_neg++;
      else if (cv == 0) n_carry_zero++;
      else n_carry_pos++;
    end
    if (cout_p != cout_n) n_cout_nz++;
    if (cin_p != cin_n)   n_cin_nz++;
  endtask

  task automatic apply_and_check();
    longint lhs, rhs;
    #1;
    lhs = num_value(x_p, x_n) + num_value(y_p, y_n) + longint'(dv(cin_p, cin_n));
    rhs = num_value(d_p, d_n) + (longint'(dv(cout_p, cout_n)) <<< N);
    check(lhs == rhs, "sum value");
    check(cout_n_b == ~cout_n, "carry-out complement rail");
    cover_digits();
  endtask

  // Change one digit of x or y and check that only sum digits j..j+2 move.
  task automatic check_locality();
    logic [N-1:0] d_p0, d_n0;
    logic         co_p0, co_n0;
    int           j;
    logic [1:0]   code;
    d_p0 = d_p; d_n0 = d_n; co_p0 = cout_p; co_n0 = cout_n;
    j = $urandom_range(N - 1);
    code = 2'($urandom);
    if ($urandom_range(1) != 0) {x_p[j], x_n[j]} = code;
    else                   {y_p[j], y_n[j]} = code;
    apply_and_check();
    for (int k = 0; k < N; k++)
      if (k < j || k > j + 2)
        check(d_p[k] == d_p0[k] && d_n[k] == d_n0[k], "carry-free locality");
    if (j < N - 2) check(cout_p == co_p0 && cout_n == co_n0, "carry-free locality (cout)");
    n_locality++;
  endtask

  // Digit-by-digit reference from the modified addition rule, worked out on
  // digit values. It applies when zero is always coded (0,0), where the
  // rule's "previous lower digits" condition and the cell's sign hint agree.
  // The sign hint from digits (a, b) below: (+1,-1) -> 1, (-1,+1) -> 0,
  // otherwise 1 exactly when one of them is -1. A sum of +1 becomes
  // carry 0, u +1 (hint 1) or carry +1, u -1 (hint 0); a sum of -1 becomes
  // carry -1, u +1 (hint 1) or carry 0, u -1 (hint 0). Sum digit i is
  // u_i + c_{i-1}.
  task automatic check_rule_table();
    int c_prev, a, b;
    c_prev = 0; a = 0; b = 0;
    for (int i = 0; i < N; i++) begin
      int xv, yv, c, u;
      bit hint;
      xv = dv(x_p[i], x_n[i]);
      yv = dv(y_p[i], y_n[i]);
      if (a == 1 && b == -1)      hint = 1;
      else if (a == -1 && b == 1) hint = 0;
      else                        hint = (a == -1 || b == -1);
      case (xv + yv)
        2:       begin c = 1;  u = 0; end
        -2:      begin c = -1; u = 0; end
        1:       begin c = hint ? 0 : 1;  u = hint ? 1 : -1; end
        -1:      begin c = hint ? -1 : 0; u = hint ? 1 : -1; end
        default: begin c = 0;  u = 0; end
      endcase
      check(dv(d_p[i], d_n[i]) == u + c_prev, $sformatf("sum digit %0d vs rule table", i));
      c_prev = c; a = xv; b = yv;
    end
    check(dv(cout_p, cout_n) == c_prev, "carry-out vs rule table");
    n_rule++;
  endtask

  // A random operand digit coded (0,0), (1,0) or (0,1) only.
  function automatic logic [1:0] canon_digit();
    case ($urandom_range(2))
      0:       return 2'b00;
      1:       return 2'b10;
      default: return 2'b01;
    endcase
  endfunction

  // Watchdog: the whole run needs about 3 * NRANDOM + NRULE + 100 ns.
  initial begin
    #(10 * (NRANDOM + NRULE) + 10000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_case[k]) n_case[k] = 0;

    // Directed: zeros in both codes.
    x_p = '0; x_n = '0; y_p = '1; y_n = '1; cin_p = 0; cin_n = 0;
    apply_and_check();
    // Largest positive and negative sums, with matching carry-in.
    x_p = '1; x_n = '0; y_p = '1; y_n = '0; cin_p = 1; cin_n = 0;
    apply_and_check();
    x_p = '0; x_n = '1; y_p = '0; y_n = '1; cin_p = 0; cin_n = 1;
    apply_and_check();
    // +1 against -1 everywhere: sum zero.
    x_p = '1; x_n = '0; y_p = '0; y_n = '1; cin_p = 0; cin_n = 0;
    apply_and_check();
    // Long runs of single +1 and single -1 digits: a ripple adder would
    // propagate a carry across the whole word here.
    x_p = '1; x_n = '0; y_p = '0; y_n = '0; cin_p = 1; cin_n = 0;
    apply_and_check();
    x_p = '0; x_n = '1; y_p = '1; y_n = '1; cin_p = 0; cin_n = 1;
    apply_and_check();

    // Random.
    for (int t = 0; t < NRANDOM; t++) begin
      x_p = N'($urandom); x_n = N'($urandom);
      y_p = N'($urandom); y_n = N'($urandom);
      {cin_p, cin_n} = 2'($urandom);
      apply_and_check();
      check_locality();
    end

    // Operands with zero coded (0,0) only, checked digit by digit.
    for (int t = 0; t < NRULE; t++) begin
      for (int i = 0; i < N; i++) begin
        {x_p[i], x_n[i]} = canon_digit();
        {y_p[i], y_n[i]} = canon_digit();
      end
      cin_p = 0; cin_n = 0;
      apply_and_check();
      check_rule_table();
    end

    // Coverage of the mechanisms.
    for (int k = 1; k <= 10; k++)
      check(n_case[k] > 0, $sformatf("case-table row %0d never exercised", k));
    check(n_carry_neg > 0 && n_carry_zero > 0 && n_carry_pos > 0, "carry values not all seen");
    check(n_cout_nz > 0, "nonzero carry-out never seen");
    check(n_cin_nz > 0, "nonzero carry-in never seen");
    check(n_locality > 0, "locality never checked");
    check(n_rule > 0, "rule table never checked");
    $display("coverage: rows %0d %0d %0d %0d %0d %0d %0d %0d zero(1,1)=%0d zero(0,0)=%0d",
             n_case[1], n_case[2], n_case[3], n_case[4], n_case[5], n_case[6],
             n_case[7], n_case[8], n_case[9], n_case[10]);
    $display("coverage: carries -1/0/+1 = %0d/%0d/%0d, cout!=0 %0d, cin!=0 %0d, locality %0d, rule %0d",
             n_carry_neg, n_carry_zero, n_carry_pos, n_cout_nz, n_cin_nz, n_locality, n_rule);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
