// gcm_pkg: types, constants and small pure functions shared by the AES-GCM datapath.
//
// Bit conventions used throughout the design:
//  * A 128-bit GCM/AES block is held as logic [127:0] with byte 0 of the block in
//    bits [127:120] (the order in which test vectors are written as hex strings).
//  * A GF(2^128) element handed to a multiplier is a coefficient vector: bit i is the
//    coefficient of x^i. GCM maps block bit 0 (the most significant bit of byte 0) to
//    x^0, so a block is turned into a coefficient vector by reversing its 128 bits.
//  * The field polynomial is F(x) = x^128 + x^7 + x^2 + x + 1.
// Keys are left aligned in a 256-bit word: a 128-bit key sits in [255:128], a 192-bit
// key in [255:64].
package gcm_pkg;


  // AES key length selector
  typedef enum logic [1:0] {
    KEY_128 = 2'd0,
    KEY_192 = 2'd1,
    KEY_256 = 2'd2
  } key_type_e;

  // Kind of a word presented on the input bus ("DataType" input of the control unit)
  typedef enum logic [2:0] {
    DT_KEY  = 3'd0,  // load a new AES key (key_in, key_type)
    DT_IV   = 3'd1,  // start a message with a 96-bit IV
    DT_AAD  = 3'd2,  // additional authenticated data block
    DT_TEXT = 3'd3,  // plaintext (encrypt) or ciphertext (decrypt) block
    DT_END  = 3'd4   // end of message: hash the length block and emit the tag
  } data_type_e;

  // Kind of a slot travelling down the AES pipeline
  typedef enum logic [2:0] {
    SL_H    = 3'd0,  // AES_K(0^128): the hash key H
    SL_Y0   = 3'd1,  // AES_K(Y0): kept for the tag
    SL_AAD  = 3'd2,  // AAD block, the AES result is unused
    SL_TEXT = 3'd3,  // data block, XORed with AES_K(Yi)
    SL_LEN  = 3'd4   // length block, the AES result is unused
  } slot_kind_e;

  // Side information pipelined with each block ("data type signal is pipelined
  // through the entire datapath")
  typedef struct packed {
    logic       valid;
    slot_kind_e kind;
    key_type_e  ktype;
    logic       decrypt;
    logic [4:0] nbytes;   // valid bytes of an AAD/TEXT block, 1..16
  } slot_tag_t;

  // Galois multiplier architecture
  typedef enum logic [1:0] {
    MUL_FH         = 2'd0,  // Fan-Hasan TMVP multiplier
    MUL_KA         = 2'd1,  // Karatsuba multiplier + reduction matrix
    MUL_MASTROVITO = 2'd2   // brute force matrix-vector multiplier
  } mult_e;

  // AES S-box realisation
  typedef enum logic {
    SBOX_LUT       = 1'b0,
    SBOX_COMPOSITE = 1'b1
  } sbox_e;

  // Number of AES rounds for a key type
  function automatic logic [3:0] num_rounds(key_type_e kt);
    case (kt)
      KEY_192: return 4'd12;
      KEY_256: return 4'd14;
      default: return 4'd10;
    endcase
  endfunction

  // Multiply a coefficient vector by x modulo F(x)
  function automatic logic [127:0] gf128_mulx(logic [127:0] a);
    logic [127:0] r;
    r = {a[126:0], 1'b0};
    if (a[127]) r = r ^ 128'h87;  // x^7 + x^2 + x + 1
    return r;
  endfunction

  // Reverse the bit order of a 128-bit word (block <-> coefficient vector)
  function automatic logic [127:0] bitrev128(logic [127:0] v);
    logic [127:0] r;
    for (int i = 0; i < 128; i++) r[i] = v[127-i];
    return r;
  endfunction

  // GF(2^8) multiply by x modulo x^8 + x^4 + x^3 + x + 1
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Keep the first nbytes bytes of a block (byte 0 in [127:120]) and clear the rest
  function automatic logic [127:0] byte_mask(logic [4:0] nbytes);
    logic [127:0] m;
    for (int i = 0; i < 16; i++) m[127-8*i -: 8] = (i < int'(nbytes)) ? 8'hff : 8'h00;
    return m;
  endfunction

endpackage
