// gf128_reduce: reduction matrix for GCM, maps a 255-coefficient product C'(x) to
// C(x) = C'(x) mod x^128 + x^7 + x^2 + x + 1.
//
// Coefficients 0..127 pass straight through (the identity part of the matrix). Every
// higher coefficient x^(128+t) is folded back with x^128 = x^7 + x^2 + x + 1; terms
// from x^249 upward land at or above x^128 again and are folded a second time. The
// fold is written from the highest coefficient down, which evaluates the fixed
// 128 x 255 reduction matrix; the XOR count of the resulting network is that of the
// matrix. Combinational.
module gf128_reduce (
  input  logic [254:0] cp,
  output logic [127:0] c
);

  always_comb begin
    logic [254:0] w;
    w = cp;
    for (int k = 254; k >= 128; k--) begin
      w[k-128] = w[k-128] ^ w[k];
      w[k-127] = w[k-127] ^ w[k];
      w[k-126] = w[k-126] ^ w[k];
      w[k-121] = w[k-121] ^ w[k];
    end
    c = w[127:0];
  end

endmodule
