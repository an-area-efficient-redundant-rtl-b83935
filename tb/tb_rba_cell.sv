// tb_rba_cell: exhaustive self-checking test of one RB adder digit.
//
// Drives all 4 x 4 codes of the operand digits against all 4 codes of the
// incoming carry digit (256 cases) and checks, for each:
//  * the value identity x + y + c_{i-1} = 2 c_i + d_i;
//  * the carry value against the case table of the addition rule: fixed
//    for sums of -2, 0, +2; for a sum of +1 the carry is 0 when c_{i-1}- = 1
//    and +1 otherwise; for -1 it is -1 when c_{i-1}- = 1 and 0 otherwise;
//  * that the carry's minus bit is 1 for a carry of -1, 0 for +1, and does
//    not depend on the incoming carry at all (no ripple);
//  * that cout_n_b is the complement of cout_n.
// The reference is worked out from digit values, not from the cell's gates.
`timescale 1ns/1ps
module tb_rba_cell;
  import rb_pkg::*;

  logic x_p, x_n, y_p, y_n, cin_p, cin_n, cin_n_b;
  logic cout_p, cout_n, cout_n_b, d_p, d_n;

  int checks   = 0;
  int failures = 0;

  rba_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=(%0b,%0b) y=(%0b,%0b) cin=(%0b,%0b) -> c=(%0b,%0b) d=(%0b,%0b)",
               what, x_p, x_n, y_p, y_n, cin_p, cin_n, cout_p, cout_n, d_p, d_n);
    end
  endtask

  // Watchdog: the sweep needs 256 steps of 1 ns.
  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cn_ref [16];  // carry minus bit seen with carry-in (0,0)
    for (int k = 0; k < 256; k++) begin
      int xv, yv, cv, s, c_exp, c_got, d_got;
      rb_digit_t xd, yd, cd;
      xd = rb_digit_t'(k[1:0]);
      yd = rb_digit_t'(k[3:2]);
      cd = rb_digit_t'(k[5:4]);
      // k[7:6] repeats the sweep so every case is also seen a second time
      {x_p, x_n} = xd;
      {y_p, y_n} = yd;
      {cin_p, cin_n} = cd;
      cin_n_b = ~cd.n;
      #1;
      xv = rb_value(xd);
      yv = rb_value(yd);
      cv = rb_value(cd);
      s  = xv + yv;
      c_got = int'(cout_p) - int'(cout_n);
      d_got = int'(d_p) - int'(d_n);

      case (s)
        2:  c_exp = 1;
        -2: c_exp = -1;
        0:  c_exp = 0;
        1:  c_exp = cd.n ? 0 : 1;
        default: c_exp = cd.n ? -1 : 0;  // s == -1
      endcase

      check(c_got == c_exp, "carry value vs case table");
      check(s + cv == 2 * c_got + d_got, "value identity");
      check(!(c_got == -1) || cout_n, "carry -1 must have minus bit 1");
      check(!(c_got == 1) || !cout_n, "carry +1 must have minus bit 0");
      check(cout_n_b == ~cout_n, "complement rail");
      if (k[5:4] == 2'b00 && k[7:6] == 2'b00) cn_ref[k[3:0]] = cout_n;
      else check(cout_n == cn_ref[k[3:0]], "carry minus bit independent of carry-in");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
