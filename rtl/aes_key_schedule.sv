// aes_key_schedule: iterative online AES key schedule with one round key register
// per pipeline round, for 128-, 192- and 256-bit keys.
//
// After a key is loaded the schedule produces one 128-bit round key per clock:
// iteration c writes round key register rk[c] (words w[4c..4c+3] of the expanded
// key), c = 0 .. Nr, so 11, 13 or 15 iterations. Registers of later rounds keep
// their old values until their iteration comes, so blocks already in the AES
// pipeline finish with the old key while new blocks follow one round behind the
// schedule. Words are formed as in FIPS-197: w[i] = w[i-Nk] ^ f(w[i-1]), where f is
// RotWord/SubWord/Rcon when i mod Nk = 0, SubWord alone when Nk = 8 and i mod 8 = 4,
// and identity otherwise. In any one iteration at most one of the four words needs
// SubWord (for 192-bit keys it is the first or the third word), so a single bank of
// four S-boxes serves every key length; its input is steered by the key type and
// the iteration. Rcon is kept in a register and doubled in GF(2^8) after each use.
// Timing: load is sampled on a clock edge; rk[c] is written on the (c+1)-th edge
// after it; busy is high from the edge after load until the last round key is
// written. A load while busy is ignored (the control unit never issues one).
// The register-per-round organisation and the four-S-box iterative schedule follow
// the datapath being modelled; the load timing and the busy flag are this design's.
module aes_key_schedule #(
  parameter gcm_pkg::sbox_e SBOX = gcm_pkg::SBOX_LUT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [255:0]           key,       // left aligned
  input  gcm_pkg::key_type_e     key_type,
  output logic [14:0][127:0]     rk,        // rk[c] = round key c
  output logic                   busy
);
  import gcm_pkg::*;

  logic [255:0] key_q;
  key_type_e    kt_q;
  logic [3:0]   c_q;        // iteration = round key index
  logic [7:0]   rcon_q;
  logic [31:0]  win_q [8];  // w[4c-8 .. 4c-1]

  // ---------------------------------------------------------------------------
  // One iteration: words w[4c .. 4c+3]
  // ---------------------------------------------------------------------------
  int unsigned  nk;
  logic [31:0]  ext [12];   // ext[0..7] = window, ext[8+p] = w[4c+p]
  logic [31:0]  key_w [8];
  logic [3:0]   sub_pos;    // bit p: word p uses the S-box
  logic         use_rcon;   // the S-box word also rotates and adds rcon
  logic [31:0]  sub_in, sub_out, f_word;
  logic [31:0]  w9_plain;

  always_comb begin
    case (kt_q)
      KEY_192: nk = 6;
      KEY_256: nk = 8;
      default: nk = 4;
    endcase
    for (int i = 0; i < 8; i++) key_w[i] = key_q[255-32*i -: 32];
    sub_pos  = '0;
    use_rcon = 1'b0;
    for (int p = 0; p < 4; p++) begin
      int unsigned idx;
      idx = 4 * int'(c_q) + p;
      if (idx >= nk) begin
        if (idx % nk == 0) begin
          sub_pos[p] = 1'b1;
          use_rcon   = 1'b1;
        end else if (nk == 8 && idx % 8 == 4) begin
          sub_pos[p] = 1'b1;
        end
      end
    end
  end

  // Word 4c+1 formed without the S-box: only needed as S-box input when the S-box
  // serves word 4c+2 (192-bit keys), in which case word 4c needs no S-box.
  always_comb begin
    logic [31:0] w8;
    int unsigned idx0;
    idx0 = 4 * int'(c_q);
    w8 = (idx0 < nk) ? key_w[idx0] : (win_q[8-nk] ^ win_q[7]);
    if (idx0 + 1 < nk) w9_plain = key_w[idx0 + 1];
    else               w9_plain = win_q[9-nk] ^ w8;
  end

  assign sub_in = sub_pos[2] ? w9_plain : win_q[7];

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    if (SBOX == SBOX_COMPOSITE) begin : g_comp
      aes_sbox_composite u_sb (.in(sub_in[8*b +: 8]), .out(sub_out[8*b +: 8]));
    end else begin : g_lut
      aes_sbox u_sb (.in(sub_in[8*b +: 8]), .out(sub_out[8*b +: 8]));
    end
  end

  // RotWord after SubWord equals SubWord after RotWord
  assign f_word = use_rcon ? ({sub_out[23:0], sub_out[31:24]} ^ {rcon_q, 24'h0}) : sub_out;

  always_comb begin
    for (int i = 0; i < 8; i++) ext[i] = win_q[i];
    for (int p = 0; p < 4; p++) begin
      int unsigned idx;
      idx = 4 * int'(c_q) + p;
      if (idx < nk)         ext[8+p] = key_w[idx];
      else if (sub_pos[p])  ext[8+p] = ext[8+p-nk] ^ f_word;
      else                  ext[8+p] = ext[8+p-nk] ^ ext[7+p];
    end
  end

  // ---------------------------------------------------------------------------
  // Registers
  // ---------------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      c_q    <= '0;
      rcon_q <= 8'h01;
      kt_q   <= KEY_128;
      key_q  <= '0;
      for (int i = 0; i < 8; i++) win_q[i] <= '0;
    end else if (load && !busy) begin
      busy   <= 1'b1;
      c_q    <= '0;
      rcon_q <= 8'h01;
      kt_q   <= key_type;
      key_q  <= key;
    end else if (busy) begin
      for (int i = 0; i < 8; i++) win_q[i] <= ext[i+4];
      if (use_rcon) rcon_q <= xtime(rcon_q);
      c_q <= c_q + 4'd1;
      if (c_q == num_rounds(kt_q)) busy <= 1'b0;
    end
  end

  // Round key registers (no reset: every one is written before it is used)
  always_ff @(posedge clk) begin
    if (busy) rk[c_q] <= {ext[8], ext[9], ext[10], ext[11]};
  end

endmodule
