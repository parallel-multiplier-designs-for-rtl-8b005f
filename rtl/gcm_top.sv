// gcm_top: pipelined AES-GCM authenticated encryption/decryption core with a
// subquadratic parallel GF(2^128) multiplier.
//
// Blocks enter one per clock on a 128-bit input bus, tagged by in_type. The Y
// counter feeds an outer-pipelined AES block (10/12/14 rounds for 128/192/256-bit
// keys) whose round keys come from an iterative online key schedule that rewrites
// one round key register per clock after a key change. Input AAD and text blocks wait
// in a FIFO until their encrypted counter leaves AES; the text is XORed with it, and
// the AAD/ciphertext/length blocks are chained through a single-cycle GF(2^128)
// multiplier (Fan-Hasan by default, Karatsuba or Mastrovito selectable). Output
// blocks and the 128-bit tag appear on one output bus in slot order.
// Latency from the input handshake to the output: 13/15/17 clocks for 128/192/256-bit
// keys (10/12/14 in AES, 1 mux register, 1 multiplier, 1 output register).
// Throughput: one 128-bit block per clock. A key change costs 5 input cycles (the key
// itself, 3 stagger bubbles and the H block), more if the previous key's schedule has
// not finished.
// Input protocol per message: [KEY] IV AAD* TEXT* END. mode_decrypt is sampled with IV.
// in_nbytes gives the valid bytes (1..16, leading bytes of the block) of AAD and TEXT
// blocks; only the last block of each kind may be partial. No output back-pressure.
module gcm_top #(
  parameter gcm_pkg::mult_e MULT       = gcm_pkg::MUL_FH,
  parameter int unsigned    HALT       = 4,
  parameter gcm_pkg::sbox_e SBOX       = gcm_pkg::SBOX_LUT,
  parameter int unsigned    FIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // input bus
  input  logic                in_valid,
  output logic                in_ready,
  input  gcm_pkg::data_type_e in_type,
  input  logic [127:0]        in_data,
  input  logic [4:0]          in_nbytes,
  input  logic [255:0]        key_in,
  input  gcm_pkg::key_type_e  key_type,
  input  logic [95:0]         iv,
  input  logic                mode_decrypt,
  // output bus
  output logic                out_valid,
  output logic                out_is_tag,
  output logic [127:0]        out_data,
  output logic [4:0]          out_nbytes
);
  import gcm_pkg::*;

  logic               ks_load, ks_busy;
  logic               ctr_load, ctr_inc, fifo_push, fifo_pop, fifo_full, fifo_empty;
  logic               aes_zero;
  slot_tag_t          in_tag, aes_out_tag;
  logic [14:0][127:0] rk;
  logic [127:0]       y, aes_in, aes_out, fifo_dout, len_block;

  gcm_control u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_type, .in_nbytes, .key_type, .mode_decrypt,
    .ks_busy, .fifo_full, .ks_load, .ctr_load, .ctr_inc, .fifo_push, .aes_zero,
    .aes_tag(in_tag));

  aes_key_schedule #(.SBOX(SBOX)) u_ks (
    .clk, .rst_n, .load(ks_load), .key(key_in), .key_type, .rk, .busy(ks_busy));

  gcm_counter u_ctr (.clk, .rst_n, .load(ctr_load), .iv, .inc(ctr_inc), .y);

  assign aes_in = aes_zero ? 128'd0 : y;

  aes_pipeline #(.SBOX(SBOX)) u_aes (
    .clk, .rst_n, .rk, .in_block(aes_in), .in_tag, .out_block(aes_out), .out_tag(aes_out_tag));

  assign fifo_pop = aes_out_tag.valid && (aes_out_tag.kind == SL_AAD || aes_out_tag.kind == SL_TEXT);

  gcm_fifo #(.WIDTH(128), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .din(in_data), .pop(fifo_pop), .dout(fifo_dout),
    .full(fifo_full), .empty(fifo_empty));

  gcm_len_block u_len (
    .clk, .rst_n,
    .clear(aes_out_tag.valid && aes_out_tag.kind == SL_Y0),
    .add_aad(aes_out_tag.valid && aes_out_tag.kind == SL_AAD),
    .add_text(aes_out_tag.valid && aes_out_tag.kind == SL_TEXT),
    .nbytes(aes_out_tag.nbytes), .len_block);

  gcm_ghash #(.MULT(MULT), .HALT(HALT)) u_ghash (
    .clk, .rst_n, .aes_block(aes_out), .aes_tag(aes_out_tag), .fifo_block(fifo_dout),
    .len_block, .out_valid, .out_is_tag, .out_data, .out_nbytes);

  a_fifo_holds_block: assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> !fifo_empty);

endmodule
