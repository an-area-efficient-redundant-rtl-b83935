// rb_adder: N-digit carry-propagation-free redundant binary adder.
//
// Adds two N-digit RB numbers x and y (digit i = (x_p[i], x_n[i]), value
// plus - minus, weight 2^i) and a carry digit cin at weight 2^0. The result
// is the N sum digits d plus a carry digit cout at weight 2^N:
//   x + y + cin = d + 2^N * cout   (all as signed values).
//
// It is a row of rba_cell digits. Each cell hands its carry digit c_i and the
// complement of c_i- to the cell above. A carry never travels more than one
// digit: c_i- depends only on digit i, and c_i+ only on digit i and c_{i-1}-,
// so digit k of the sum depends on input digits k, k-1 and k-2 only, and the
// delay is the same for any N.
//
// Interface: plain packed vectors of plus and minus bits, digit i at bit i.
// cout_n_b is the complement of cout_n, ready for a further adder's dual-rail
// carry input. Sum digit 0 has d_p[0] = cin_p, a wire straight from the input,
// as the cell equation d_i+ = c_{i-1}+ dictates.
// Timing: combinational, no clock or reset.
//
// The cell is the published one. The word length N (default 16), the
// carry-in and carry-out ports and the packing of the ports are choices of
// this RTL; the document describes the single digit.
module rb_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x_p,
  input  logic [N-1:0] x_n,
  input  logic [N-1:0] y_p,
  input  logic [N-1:0] y_n,
  input  logic         cin_p,
  input  logic         cin_n,
  output logic [N-1:0] d_p,
  output logic [N-1:0] d_n,
  output logic         cout_p,
  output logic         cout_n,
  output logic         cout_n_b
);

  // Carry digit chain: index i+1 is the carry out of digit i.
  logic [N:0] c_p;
  logic [N:0] c_n;
  logic [N:0] c_n_b;

  assign c_p[0]   = cin_p;
  assign c_n[0]   = cin_n;
  assign c_n_b[0] = ~cin_n;

  for (genvar i = 0; i < N; i++) begin : g_digit
    rba_cell u_cell (
      .x_p      (x_p[i]),
      .x_n      (x_n[i]),
      .y_p      (y_p[i]),
      .y_n      (y_n[i]),
      .cin_p    (c_p[i]),
      .cin_n    (c_n[i]),
      .cin_n_b  (c_n_b[i]),
      .cout_p   (c_p[i+1]),
      .cout_n   (c_n[i+1]),
      .cout_n_b (c_n_b[i+1]),
      .d_p      (d_p[i]),
      .d_n      (d_n[i])
    );
  end

  assign cout_p = c_p[N];
  assign cout_n   = c_n[N];
  assign cout_n_b = c_n_b[N];

endmodule
