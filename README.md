# Redundant binary adder with a modified addition rule

A redundant binary (RB) adder adds two signed-digit numbers whose digits are
-1, 0 or +1. Because each value has several digit strings, a carry can always
be absorbed at most one or two digits up. So the adder's delay does not depend
on its width. RB adders are used mainly in the partial-product trees of fast
multipliers.

This RTL models the digit cell of the area-efficient RB adder described in
"An Area Efficient Redundant Binary (RB) Adder Using Modified RB Addition
Rule". It also chains that cell into an N-digit adder. The cell was designed
as a 50-transistor transmission-gate circuit. Here it is written as its logic
equations: three XORs and two 2:1 multiplexers per digit.

## Digit encoding

Every digit, including each carry and each sum digit, is a pair of wires
(plus, minus) whose value is `plus - minus`:

| (plus, minus) | value |
|---------------|-------|
| (0,0)         | 0     |
| (0,1)         | -1    |
| (1,0)         | +1    |
| (1,1)         | 0     |

Zero has two codes. The adder relies on this: the minus bit of a carry is 1
for every carry of -1 and 0 for every carry of +1. Only a carry of 0 may
carry either minus bit. As a result, the digit above can read that one bit as
a **sign hint** about the incoming carry.

## How one digit adds (`rtl/rba_cell.sv`)

The goal is `x_i + y_i + c_{i-1} = 2 c_i + d_i`, where `d_i` is the sum digit
in {-1, 0, +1}. The cell first splits `x_i + y_i = 2 c_i + u_i`, giving a
carry `c_i` and an intermediate sum `u_i`. It then sets `d_i = u_i + c_{i-1}`.
For that to stay in range, `u_i` must have the sign opposite to the sign
`c_{i-1}` could have:

| x_i + y_i | hint c_{i-1}- = 1 (carry below is 0 or -1) | hint = 0 (carry below is 0 or +1) |
|-----------|--------------------------------------------|-----------------------------------|
| +2        | c = +1, u = 0                              | same                              |
| 0         | c = 0, u = 0                               | same                              |
| -2        | c = -1, u = 0                              | same                              |
| +1        | c = 0, u = +1                              | c = +1, u = -1                    |
| -1        | c = -1, u = +1                             | c = 0, u = -1                     |

The classic Takagi rule looks at both operand digits one position down to
decide whether the carry coming up can be negative. The modified rule treats
a lower pair of +1 and -1 as special, because such a pair can produce no carry
at all. In this cell the whole decision collapses into the one wire
`c_{i-1}-`, and no separate look-back logic is needed.

The equations (`^` is XOR):

```
g    = (x+ ^ x-) ^ (y+ ^ y-)      // exactly one operand digit is nonzero
c-   = (y+ ^ y-) ? y- : x-        // minus bit of y if y != 0, else of x
c+   = g ? ~c_{i-1}- : x+
d+   = c_{i-1}+
d-   = g ^ c_{i-1}-
```

The intermediate sum (`u+ = g & c_{i-1}-`, `u- = g & ~c_{i-1}-`) is folded
into `d` and never appears on a wire. The easiest way to see why `c-` is a
valid hint:

- When `g = 0`, the carry is `(x+, c-)`. For two zeros this is just x's zero
  code. For two equal nonzero digits it is that digit. For +1 with -1 it is
  the zero code `(x+, y-)`.
- When `g = 1`, `c-` is the minus bit of the one nonzero digit. A single -1
  gives carry -1 or 0, and `c- = 1` encodes both. A single +1 gives carry 0
  or +1, and `c- = 0` encodes both.

**Why no carry ripples.** `c_i-` depends only on digit i. `c_i+` depends on
digit i and on `c_{i-1}-`. So sum digit k depends only on operand digits k,
k-1 and k-2. The critical path is x/y → g → `d-`, whatever the width.

Ports: `x_p, x_n, y_p, y_n, cin_p, cin_n, cin_n_b` in, and
`cout_p, cout_n, cout_n_b, d_p, d_n` out. The `_b` wires are the complementary
rail of the carry's minus bit. The transistor circuit needs that rail, and
here it also drives the `c+` multiplexer. An immediate assertion checks that
`cin_n_b == ~cin_n`.

## The N-digit adder (`rtl/rb_adder.sv`, top level)

`rb_adder #(N)` places N cells side by side. Cell i receives cell i-1's carry
digit and its complement rail. The result satisfies

```
x + y + cin = d + 2^N * cout
```

with every term read as a signed RB value and digit i at weight 2^i. Ports
are packed vectors of plus and minus bits (`x_p[i]`, `x_n[i]`, ...). The carry
digit at each end is a port: tie `cin` to `(0,0)` for a plain adder, or chain
adders through `cout_p/cout_n/cout_n_b`. Sum digit 0's plus bit equals
`cin_p` by construction. The adder is purely combinational: no clock, no
reset, no registers.

`rtl/rb_pkg.sv` holds the digit struct `rb_digit_t` and `rb_value()`. The
testbenches use them.

## What follows the source and what is this design's own

Taken from the published design:
- the digit encoding;
- the case table;
- the cell's logic equations;
- the cell's port list, including the complementary carry rail.

The source prints the equations with their complement bars partly illegible.
The bars were restored as shown above, which is the only placement that
satisfies the case table and the value identity. The multiplexer that makes
`c+` does take the complemented `c_{i-1}-` rail in the cell's logic drawing.
In one row of the case table (a single -1 digit with hint 0), the source's
carry is printed as (0,0). The equations give (1,1), which is also zero, so
sums are identical.

Choices made here:
- the word length (N = 16 by default; the source describes one digit);
- the carry-in and carry-out ports;
- gate-level modelling instead of transmission gates;
- the dual-rail assertion.

Not modelled:
- The circuit-level results: 1.24 ns delay at fan-out 1 in 0.6 µm CMOS, and
  50 transistors against 56 and 62 for two earlier RB adders. An RTL model
  cannot reproduce them.
- The RB multiplier and its partial-product tree, which the adder is meant
  for. They are not specified.
- Conversion of an RB result back to two's complement.

## Verification

Both testbenches are self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

- `tb/tb_rba_cell.sv` is exhaustive over all 256 combinations of operand and
  carry codes. It checks:
  - the value identity;
  - the carry value against the case table above;
  - the sign-hint property of `c-`;
  - that `c-` is independent of the incoming carry;
  - the complement rail.
- `tb/tb_rb_adder.sv` runs the adder at its default N = 16. It uses directed
  extremes plus 20,000 random vectors over all four codes and random
  carry-ins. It checks:
  - the total value;
  - locality: after one operand digit j changes, no sum digit outside j..j+2
    changes;
  - for 5,000 vectors with canonical zeros, every sum digit against an
    independent digit-serial model of the modified rule.

  It also counts every row of the case table, both hint polarities, both zero
  codes, carries of -1, 0 and +1, and nonzero carry-in and carry-out. A row
  that never occurs counts as a failure.

To run with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rb_pkg.sv rtl/rba_cell.sv \
          rtl/rb_adder.sv tb/tb_rb_adder.sv --top-module tb_rb_adder
./obj_dir/Vtb_rb_adder
```

Use `tb/tb_rba_cell.sv` with `--top-module tb_rba_cell` for the cell alone.
To change the width, set `N` on `rb_adder`. `tb_rb_adder` checks values with
64-bit integers and has a local `N` that must match, so keep N at 60 or less
there.
