// gf128_mul_ka: Karatsuba GF(2^128) multiplier for GCM.
//
// A recursive Karatsuba polynomial multiplier (halting at HALT coefficients) forms the
// 255-coefficient product C'(x) = A(x) B(x); a separate reduction-matrix stage reduces
// it modulo x^128 + x^7 + x^2 + x + 1. Unlike the matrix-vector multipliers, the
// multiplication and the reduction are two distinct steps.
// Interface: coefficient vectors (bit i = coefficient of x^i); combinational.
module gf128_mul_ka #(
  parameter int unsigned HALT = 4
) (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] c
);

  logic [254:0] cp;

  gf_ka_mul #(.N(128), .HALT(HALT)) u_ka (.a(a), .b(b), .c(cp));
  gf128_reduce u_red (.cp(cp), .c(c));

endmodule
