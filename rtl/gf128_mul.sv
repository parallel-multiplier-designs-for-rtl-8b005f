// gf128_mul: the Galois field multiplier of the GCM datapath, C = A * B in GF(2^128)
// with F(x) = x^128 + x^7 + x^2 + x + 1.
//
// MULT selects the architecture: the Fan-Hasan TMVP multiplier (the default), the
// Karatsuba multiplier with a reduction matrix, or the brute force Mastrovito
// multiplier. All three are single-cycle parallel multipliers with the same
// interface, so the GHASH feedback loop closes in one clock whichever is chosen.
// Interface: coefficient vectors (bit i = coefficient of x^i), b is the hash key
// operand; combinational.
module gf128_mul #(
  parameter gcm_pkg::mult_e MULT = gcm_pkg::MUL_FH,
  parameter int unsigned    HALT = 4
) (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] c
);
  import gcm_pkg::*;

  if (MULT == MUL_KA) begin : g_ka
    gf128_mul_ka #(.HALT(HALT)) u_mul (.a(a), .b(b), .c(c));
  end else if (MULT == MUL_MASTROVITO) begin : g_mastrovito
    gf128_mul_mastrovito u_mul (.a(a), .b(b), .c(c));
  end else begin : g_fh
    gf128_mul_fh #(.HALT(HALT)) u_mul (.a(a), .b(b), .c(c));
  end

endmodule
