// rba_cell: one digit of an area-efficient redundant binary adder (RBA).
//
// Adds two RB digits x_i and y_i (value = plus - minus bit, see rb_pkg) and
// the carry digit c_{i-1} from the digit below, giving the sum digit d_i and
// the carry digit c_i for the digit above, with x + y + c_{i-1} = 2c_i + d_i.
//
// How it works. g is 1 when exactly one of x_i, y_i is nonzero (sum +-1).
//  * g = 0: the digit sum is -2, 0 or +2, so the carry is fixed
//    (c_i = (x+, c-)) and the intermediate sum u_i is 0.
//  * g = 1: the sum is +-1 and may be written either as 2c + u with u = +1 or
//    with u = -1. The choice is made from c_{i-1}- alone: a carry whose minus
//    bit is 1 is 0 or -1, so u = +1 is safe; a minus bit of 0 means 0 or +1,
//    so u = -1 is safe. No carry ever has to ripple further.
//  * c_i- depends on x_i, y_i only: it is the minus bit of y when y is
//    nonzero, else the minus bit of x. It is therefore 1 for every carry of
//    -1 and 0 for every carry of +1, which is the hint the next digit uses.
// Logic equations:
//   g    = (x+ ^ x-) ^ (y+ ^ y-)
//   c-   = (y+ ^ y-) ? y- : x-          (mux)
//   c+   = g ? ~c_{i-1}- : x+           (mux)
//   d+   = c_{i-1}+
//   d-   = g ^ c_{i-1}-
// The intermediate sum (u+ = g c_{i-1}-, u- = g ~c_{i-1}-) is folded into
// d and never appears on a wire.
//
// Interface: single-bit ports named after the cell symbol, including the
// dual-rail complement of c- in and out (cin_n_b, cout_n_b), which the
// transmission-gate circuit needs and which feeds the c+ mux here too.
// cin_n_b must equal ~cin_n; an assertion checks it.
// Timing: purely combinational. The longest path is x/y -> g -> d-, so a
// chain of cells has a delay independent of its length.
//
// The equations and the encoding follow the published cell. Modelling it as
// gates rather than transmission gates, and the assertion, are choices of
// this RTL.
module rba_cell (
  input  logic x_p,
  input  logic x_n,
  input  logic y_p,
  input  logic y_n,
  input  logic cin_p,
  input  logic cin_n,
  input  logic cin_n_b,
  output logic cout_p,
  output logic cout_n,
  output logic cout_n_b,
  output logic d_p,
  output logic d_n
);

  logic x_nz;  // x_i is nonzero
  logic y_nz;  // y_i is nonzero
  logic g;     // exactly one operand digit is nonzero

  always_comb begin
    x_nz     = x_p ^ x_n;
    y_nz     = y_p ^ y_n;
    g        = x_nz ^ y_nz;
    cout_n   = y_nz ? y_n : x_n;
    cout_n_b = ~cout_n;
    cout_p   = g ? cin_n_b : x_p;
    d_p      = cin_p;
    d_n      = g ^ cin_n;
  end

  always_comb begin
    a_dual_rail: assert (cin_n_b == ~cin_n)
      else $error("rba_cell: cin_n_b is not the complement of cin_n");
  end

endmodule
