// gf128_mul_mastrovito: brute force (Mastrovito) GF(2^128) multiplier for GCM.
//
// The polynomial matrix P of B is built column by column, column j being
// x^j * B(x) mod x^128 + x^7 + x^2 + x + 1; the product is C = P * a, one AND layer of
// m^2 gates followed by an XOR tree per row. It has the shortest delay and quadratic
// area; the datapath can select it in place of the subquadratic multipliers.
// Interface: coefficient vectors (bit i = coefficient of x^i); combinational.
module gf128_mul_mastrovito (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] c
);
  import gcm_pkg::*;

  logic [127:0] col [128];

  always_comb begin
    col[0] = b;
    for (int j = 1; j < 128; j++) col[j] = gf128_mulx(col[j-1]);
  end

  always_comb begin
    for (int i = 0; i < 128; i++) begin
      c[i] = 1'b0;
      for (int j = 0; j < 128; j++) c[i] = c[i] ^ (col[j][i] & a[j]);
    end
  end

endmodule
