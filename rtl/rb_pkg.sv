// rb_pkg: shared types for redundant binary (RB) arithmetic.
//
// A redundant binary digit takes the values -1, 0 and +1 and is carried on
// two wires, a plus bit and a minus bit, with value = plus - minus:
//   (0,0) = 0, (0,1) = -1, (1,0) = +1, (1,1) = 0.
// Zero therefore has two codes. The adder cell uses that freedom: the minus
// bit of a carry digit doubles as a sign hint for the digit above it.
package rb_pkg;

  typedef struct packed {
    logic p;  // plus bit
    logic n;  // minus bit
  } rb_digit_t;

  // Value of one digit, -1..+1.
  function automatic int rb_value(rb_digit_t d);
    return int'(d.p) - int'(d.n);
  endfunction

endpackage
