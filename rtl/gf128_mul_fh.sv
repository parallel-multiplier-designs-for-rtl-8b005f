// gf128_mul_fh: Fan-Hasan subquadratic GF(2^128) multiplier for the GCM polynomial.
//
// C(x) = A(x) * B(x) mod x^128 + x^7 + x^2 + x + 1, computed as the matrix-vector
// product C = P(B) * a. The polynomial matrix stage turns B into the generating vector
// of a 128 x 128 Toeplitz matrix (rows 7..127 and row 0 of P, padded with six zero
// rows) and into the six non-Toeplitz rows 1..6. The Toeplitz part is multiplied by a
// recursive TMVP (XOR reduction layers, an AND layer, XOR expansion layers) that
// yields C0 and C7..C127; the six rows are multiplied brute force, Mastrovito style,
// and yield C1..C6. The outputs of the six padding rows are discarded.
// Interface: a, b and c are coefficient vectors (bit i = coefficient of x^i);
// combinational. b is the operand that feeds the polynomial matrix (the hash key in
// GCM). HALT is the size at which the TMVP recursion switches to brute force.
module gf128_mul_fh #(
  parameter int unsigned HALT = 4
) (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] c
);

  logic [254:0]      toep;
  logic [5:0][127:0] top_rows;
  logic [127:0]      tv;

  gf128_poly_matrix u_pm (.b(b), .toep(toep), .top_rows(top_rows));

  gf_tmvp #(.N(128), .HALT(HALT)) u_tmvp (.t(toep), .v(a), .c(tv));

  assign c[0]      = tv[121];
  assign c[127:7]  = tv[120:0];
  for (genvar r = 0; r < 6; r++) begin : g_mastrovito
    assign c[r+1] = ^(top_rows[r] & a);
  end

endmodule
