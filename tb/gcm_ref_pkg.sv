// gcm_ref_pkg: reference models for the testbenches, written independently of the
// RTL: the GF(2^128) product follows the bit-serial right-shift algorithm of the GCM
// specification on blocks, the S-box inverts by exhaustive search, and AES and GCM
// are modelled straight from their definitions.
package gcm_ref_pkg;

  // GF(2^8) product modulo x^8 + x^4 + x^3 + x + 1
  function automatic logic [7:0] ref_gmul8(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  logic [7:0] sbox_cache [256];
  bit         sbox_ready = 0;

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    if (!sbox_ready) begin
      for (int v = 0; v < 256; v++) begin
        logic [7:0] inv, s;
        inv = 8'h00;
        for (int w = 1; w < 256; w++) if (ref_gmul8(8'(v), 8'(w)) == 8'h01) inv = 8'(w);
        s = 8'h63;
        for (int i = 0; i < 8; i++)
          s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
        sbox_cache[v] = s;
      end
      sbox_ready = 1;
    end
    return sbox_cache[x];
  endfunction

  // GCM block multiplication (bit 0 of a block = x^0 = most significant bit)
  function automatic logic [127:0] ref_ghash_mul(logic [127:0] x, logic [127:0] y);
    logic [127:0] z, v;
    z = '0;
    v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'd0}) : (v >> 1);
    end
    return z;
  endfunction

  function automatic logic [127:0] ref_rev(logic [127:0] v);
    logic [127:0] r;
    for (int i = 0; i < 128; i++) r[i] = v[127-i];
    return r;
  endfunction

  // Coefficient-vector product (bit i = x^i)
  function automatic logic [127:0] ref_coef_mul(logic [127:0] a, logic [127:0] b);
    return ref_rev(ref_ghash_mul(ref_rev(a), ref_rev(b)));
  endfunction

  // Unreduced carry-less product of two N-bit polynomials (N <= 128)
  function automatic logic [254:0] ref_clmul(logic [127:0] a, logic [127:0] b);
    logic [254:0] p;
    p = '0;
    for (int i = 0; i < 128; i++) if (a[i]) p ^= (255'(b) << i);
    return p;
  endfunction

  // Expanded AES key: round keys 0..Nr; kt: 0 = 128, 1 = 192, 2 = 256 bits
  function automatic void ref_expand(logic [255:0] key, int kt, output logic [127:0] rks [15]);
    logic [31:0] w [60];
    int nk, nr;
    logic [7:0] rc;
    nk = (kt == 0) ? 4 : (kt == 1) ? 6 : 8;
    nr = nk + 6;
    rc = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = key[255-32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        for (int b = 0; b < 4; b++) t[8*b +: 8] = ref_sbox(t[8*b +: 8]);
        t[31:24] ^= rc;
        rc = ref_gmul8(rc, 8'h02);
      end else if (nk == 8 && i % nk == 4) begin
        for (int b = 0; b < 4; b++) t[8*b +: 8] = ref_sbox(t[8*b +: 8]);
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int r = 0; r < 15; r++) rks[r] = (r <= nr) ? {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]} : '0;
  endfunction

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] rk, bit last);
    logic [7:0] a [4][4];
    logic [7:0] b [4][4];
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      a[r][c] = ref_sbox(s[127 - 8*(4*c + r) -: 8]);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[r][c] = a[r][(c + r) % 4];
    if (!last) begin
      for (int c = 0; c < 4; c++) begin
        logic [7:0] x0, x1, x2, x3;
        x0 = b[0][c]; x1 = b[1][c]; x2 = b[2][c]; x3 = b[3][c];
        b[0][c] = ref_gmul8(x0, 2) ^ ref_gmul8(x1, 3) ^ x2 ^ x3;
        b[1][c] = x0 ^ ref_gmul8(x1, 2) ^ ref_gmul8(x2, 3) ^ x3;
        b[2][c] = x0 ^ x1 ^ ref_gmul8(x2, 2) ^ ref_gmul8(x3, 3);
        b[3][c] = ref_gmul8(x0, 3) ^ x1 ^ x2 ^ ref_gmul8(x3, 2);
      end
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      s[127 - 8*(4*c + r) -: 8] = b[r][c];
    return s ^ rk;
  endfunction

  function automatic logic [127:0] ref_aes(logic [255:0] key, int kt, logic [127:0] pt);
    logic [127:0] rks [15];
    logic [127:0] s;
    int nr;
    nr = (kt == 0) ? 10 : (kt == 1) ? 12 : 14;
    ref_expand(key, kt, rks);
    s = pt ^ rks[0];
    for (int r = 1; r <= nr; r++) s = ref_round(s, rks[r], r == nr);
    return s;
  endfunction

  function automatic logic [127:0] ref_mask(int nbytes);
    logic [127:0] m;
    for (int i = 0; i < 16; i++) m[127-8*i -: 8] = (i < nbytes) ? 8'hff : 8'h00;
    return m;
  endfunction

  // Whole GCM operation; aad/txt hold full blocks, the last ones possibly partial.
  // Returns output blocks in out[] and the tag.
  function automatic void ref_gcm(logic [255:0] key, int kt, logic [95:0] iv, bit decrypt,
                                  logic [127:0] aad [], int aad_last_bytes,
                                  logic [127:0] txt [], int txt_last_bytes,
                                  output logic [127:0] out [], output logic [127:0] tag);
    logic [127:0] h, ek0, y, x, c;
    logic [63:0]  la, lc;
    int nb;
    h   = ref_aes(key, kt, 128'd0);
    y   = {iv, 32'd1};
    ek0 = ref_aes(key, kt, y);
    x   = '0;
    la  = 0;
    lc  = 0;
    out = new[txt.size()];
    foreach (aad[i]) begin
      nb = (i == aad.size() - 1) ? aad_last_bytes : 16;
      x  = ref_ghash_mul(x ^ (aad[i] & ref_mask(nb)), h);
      la += 64'(8 * nb);
    end
    foreach (txt[i]) begin
      nb = (i == txt.size() - 1) ? txt_last_bytes : 16;
      y[31:0] = y[31:0] + 1;
      out[i] = (txt[i] ^ ref_aes(key, kt, y)) & ref_mask(nb);
      c = decrypt ? (txt[i] & ref_mask(nb)) : out[i];
      x  = ref_ghash_mul(x ^ c, h);
      lc += 64'(8 * nb);
    end
    x   = ref_ghash_mul(x ^ {la, lc}, h);
    tag = x ^ ek0;
  endfunction

endpackage
