// aes_sbox: AES byte substitution, look-up table realisation.
//
// The S-box is the multiplicative inverse in GF(2^8) (modulo x^8 + x^4 + x^3 + x + 1,
// with 0 mapped to 0) followed by the affine transformation
//   s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The 256-entry table is computed at elaboration from exponent/logarithm tables of
// the generator 3 and read with the input byte as the index, which is the low-delay
// LUT form of the S-box.
// Interface: combinational, one byte in, one byte out.
module aes_sbox (
  input  logic [7:0] in,
  output logic [7:0] out
);
  import gcm_pkg::*;

  function automatic logic [2047:0] gen_table();
    logic [7:0]   exp_t [256];
    logic [7:0]   log_t [256];
    logic [7:0]   g, inv, s;
    logic [2047:0] tbl;
    g = 8'h01;
    for (int i = 0; i < 256; i++) log_t[i] = 8'h00;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = g;
      log_t[g] = 8'(i);
      g = g ^ xtime(g);             // multiply by 3
    end
    exp_t[255] = exp_t[0];
    for (int x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : exp_t[(255 - int'(log_t[x])) % 255];
      s   = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
                ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      tbl[8*x +: 8] = s;
    end
    return tbl;
  endfunction

  localparam logic [2047:0] SBOX_TABLE = gen_table();

  assign out = SBOX_TABLE[8*in +: 8];

endmodule
