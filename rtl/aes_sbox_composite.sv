// aes_sbox_composite: AES byte substitution computed in the composite field
// GF(((2^2)^2)^2) instead of read from a table.
//
// Stages: isomorphic mapping GF(2^8) -> GF((2^4)^2), inversion, inverse mapping,
// affine transformation. With an element written a*x + b (a, b in GF(2^4)) and the
// field polynomial x^2 + x + lambda, lambda = 4'b1100, the inverse is
//   (a x + b)^-1 = a d^-1 x + (a + b) d^-1,   d = a^2 lambda + b (a + b)
// so one GF(2^8) inversion costs a few GF(2^4) multiplications, one squaring, one
// multiply-by-lambda and one GF(2^4) inversion. GF(2^4) is built the same way over
// GF(2^2) with y^2 + y + phi, phi = 2'b10, and GF(2^2) uses z^2 + z + 1, where
// inversion is squaring. The two 8x8 mapping matrices are fixed; they are derived at
// elaboration by finding a root beta of the AES polynomial x^8 + x^4 + x^3 + x + 1
// in the composite field and mapping x^i to beta^i. The choice of phi, of the
// GF(2^2) polynomial and of the root are this design's own; lambda follows the
// composite S-box being modelled.
// Interface: combinational, one byte in, one byte out; same function as aes_sbox.
module aes_sbox_composite (
  input  logic [7:0] in,
  output logic [7:0] out
);

  // ---- GF(2^2): z^2 + z + 1 ----
  function automatic logic [1:0] gf4_mul(logic [1:0] a, logic [1:0] b);
    return {(a[1] & b[1]) ^ (a[1] & b[0]) ^ (a[0] & b[1]), (a[1] & b[1]) ^ (a[0] & b[0])};
  endfunction
  function automatic logic [1:0] gf4_sq(logic [1:0] a);   // also the inverse
    return {a[1], a[1] ^ a[0]};
  endfunction
  function automatic logic [1:0] gf4_mul_phi(logic [1:0] a);  // times z
    return gf4_mul(a, 2'b10);
  endfunction

  // ---- GF(2^4) = GF(2^2)[y] / (y^2 + y + phi) ----
  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] hh, hl, lh, ll;
    hh = gf4_mul(a[3:2], b[3:2]);
    hl = gf4_mul(a[3:2], b[1:0]);
    lh = gf4_mul(a[1:0], b[3:2]);
    ll = gf4_mul(a[1:0], b[1:0]);
    return {hh ^ hl ^ lh, gf4_mul_phi(hh) ^ ll};
  endfunction
  function automatic logic [3:0] gf16_inv(logic [3:0] a);
    logic [1:0] d, di;
    d  = gf4_mul_phi(gf4_sq(a[3:2])) ^ gf4_mul(a[1:0], a[3:2] ^ a[1:0]);
    di = gf4_sq(d);
    return {gf4_mul(a[3:2], di), gf4_mul(a[3:2] ^ a[1:0], di)};
  endfunction

  localparam logic [3:0] LAMBDA = 4'b1100;

  // ---- GF(2^8) composite: x^2 + x + lambda ----
  function automatic logic [7:0] gf256c_mul(logic [7:0] a, logic [7:0] b);
    logic [3:0] hh, hl, lh, ll;
    hh = gf16_mul(a[7:4], b[7:4]);
    hl = gf16_mul(a[7:4], b[3:0]);
    lh = gf16_mul(a[3:0], b[7:4]);
    ll = gf16_mul(a[3:0], b[3:0]);
    return {hh ^ hl ^ lh, gf16_mul(hh, LAMBDA) ^ ll};
  endfunction
  function automatic logic [7:0] gf256c_inv(logic [7:0] v);
    logic [3:0] a, b, d, di;
    a  = v[7:4];
    b  = v[3:0];
    d  = gf16_mul(gf16_mul(a, a), LAMBDA) ^ gf16_mul(b, a ^ b);
    di = gf16_inv(d);
    return {gf16_mul(a, di), gf16_mul(a ^ b, di)};
  endfunction

  // Columns of the map GF(2^8) -> composite: column i is beta^i
  function automatic logic [63:0] gen_map();
    logic [7:0] beta, p, acc;
    logic [63:0] m;
    m = '0;
    for (int cand = 2; cand < 256; cand++) begin
      beta = 8'(cand);
      // evaluate beta^8 + beta^4 + beta^3 + beta + 1
      p = 8'h01;
      acc = 8'h01;
      for (int e = 1; e <= 8; e++) begin
        p = gf256c_mul(p, beta);
        if (e == 1 || e == 3 || e == 4 || e == 8) acc = acc ^ p;
      end
      if (acc == 8'h00 && m == '0) begin
        p = 8'h01;
        for (int i = 0; i < 8; i++) begin
          m[8*i +: 8] = p;
          p = gf256c_mul(p, beta);
        end
      end
    end
    return m;
  endfunction

  localparam logic [63:0] MAP = gen_map();

  function automatic logic [7:0] apply_map(logic [63:0] m, logic [7:0] v);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 8; i++) if (v[i]) r = r ^ m[8*i +: 8];
    return r;
  endfunction

  // Columns of the inverse map: column j is the byte that maps to bit j
  function automatic logic [63:0] gen_inv_map(logic [63:0] m);
    logic [63:0] r;
    r = '0;
    for (int x = 0; x < 256; x++)
      for (int j = 0; j < 8; j++)
        if (apply_map(m, 8'(x)) == 8'(1 << j)) r[8*j +: 8] = 8'(x);
    return r;
  endfunction

  localparam logic [63:0] INV_MAP = gen_inv_map(MAP);

  logic [7:0] mapped, inv, unmapped;

  assign mapped   = apply_map(MAP, in);
  assign inv      = gf256c_inv(mapped);
  assign unmapped = apply_map(INV_MAP, inv);
  assign out      = unmapped ^ {unmapped[6:0], unmapped[7]} ^ {unmapped[5:0], unmapped[7:6]}
                  ^ {unmapped[4:0], unmapped[7:5]} ^ {unmapped[3:0], unmapped[7:4]} ^ 8'h63;

endmodule
