// aes_round: one AES encryption round: SubBytes, ShiftRows, MixColumns and the
// round key addition.
//
// The state is the 128-bit block filled column by column: byte k of the block
// (bits [127-8k -: 8]) is state row k%4, column k/4. SubBytes uses 16 S-boxes;
// ShiftRows rotates row r left by r positions (wiring only); MixColumns multiplies
// each column by the fixed matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2] over GF(2^8)
// (multiply by 2 is xtime, 3*a = 2*a ^ a). FINAL = 1 gives the last round, which
// has no MixColumns. SBOX selects the look-up table or the composite field S-box.
// Interface: combinational; the pipeline registers live in the AES block.
module aes_round #(
  parameter bit            FINAL = 1'b0,
  parameter gcm_pkg::sbox_e SBOX = gcm_pkg::SBOX_LUT
) (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  output logic [127:0] state_out
);
  import gcm_pkg::*;

  logic [7:0] sb [16];   // after SubBytes, index = byte number
  logic [7:0] sr [16];   // after ShiftRows
  logic [7:0] mc [16];   // after MixColumns

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    if (SBOX == SBOX_COMPOSITE) begin : g_comp
      aes_sbox_composite u_sbox (.in(state_in[127-8*k -: 8]), .out(sb[k]));
    end else begin : g_lut
      aes_sbox u_sbox (.in(state_in[127-8*k -: 8]), .out(sb[k]));
    end
  end

  // ShiftRows: new (r, c) takes old (r, c + r mod 4)
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[4*c + r] = sb[4*((c + r) % 4) + r];
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = sr[4*c]; a1 = sr[4*c+1]; a2 = sr[4*c+2]; a3 = sr[4*c+3];
      if (FINAL) begin
        mc[4*c] = a0; mc[4*c+1] = a1; mc[4*c+2] = a2; mc[4*c+3] = a3;
      end else begin
        mc[4*c]   = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
        mc[4*c+1] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
        mc[4*c+2] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
        mc[4*c+3] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
      end
    end
  end

  for (genvar k = 0; k < 16; k++) begin : g_out
    assign state_out[127-8*k -: 8] = mc[k] ^ round_key[127-8*k -: 8];
  end

endmodule
