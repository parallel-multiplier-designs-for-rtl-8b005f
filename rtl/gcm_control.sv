// gcm_control: control unit of the GCM datapath (input side).
//
// Every accepted input word becomes at most one slot in the AES pipeline, tagged with
// its kind, the current key type, the encrypt/decrypt mode and its byte count; the
// tag travels with the block so that every later stage acts on it at the right time.
//   KEY   starts the iterative key schedule. It is held off (in_ready low) while the
//         schedule is still filling the round key registers for the previous key,
//         since blocks in flight still need those keys. It is followed by a fixed
//         stagger: three bubble cycles, then an injected slot that encrypts 0^128 to
//         obtain the new hash key H, so the first new block enters 5 clocks after
//         the key. The stagger lets blocks of a longer previous key leave the final
//         round before blocks of a shorter new key reach it.
//   IV    loads the Y counter with IV || 0^31 1 (slot Y0) and latches the mode.
//   AAD   pushes the block into the FIFO; its slot rides through AES unused.
//   TEXT  pushes the block into the FIFO and increments the counter (slot Y(i)).
//   END   emits the length-block slot that closes the hash and produces the tag.
// Interface: valid/ready handshake on the input; in_ready depends on in_type (a key
// waits for the schedule, AAD/TEXT wait for FIFO space). Messages must not span a key
// change. The fixed stagger and the handling of the H block follow the key change
// scheme being modelled; the handshake and the command encoding are this design's.
module gcm_control (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  gcm_pkg::data_type_e    in_type,
  input  logic [4:0]             in_nbytes,
  input  gcm_pkg::key_type_e     key_type,
  input  logic                   mode_decrypt,
  input  logic                   ks_busy,
  input  logic                   fifo_full,
  output logic                   ks_load,
  output logic                   ctr_load,
  output logic                   ctr_inc,
  output logic                   fifo_push,
  output logic                   aes_zero,      // AES input is 0^128 (H slot)
  output gcm_pkg::slot_tag_t     aes_tag
);
  import gcm_pkg::*;

  localparam logic [2:0] STAGGER = 3'd4;

  logic [2:0] stag_q;
  key_type_e  kt_q;
  logic       dec_q;
  logic       fire;

  always_comb begin
    in_ready = 1'b0;
    if (stag_q == '0) begin
      unique case (in_type)
        DT_KEY:          in_ready = !ks_busy;
        DT_AAD, DT_TEXT: in_ready = !fifo_full;
        default:         in_ready = 1'b1;
      endcase
    end
  end

  assign fire      = in_valid && in_ready;
  assign ks_load   = fire && in_type == DT_KEY;
  assign ctr_load  = fire && in_type == DT_IV;
  assign ctr_inc   = fire && in_type == DT_TEXT;
  assign fifo_push = fire && (in_type == DT_AAD || in_type == DT_TEXT);
  assign aes_zero  = (stag_q == 3'd1);

  always_comb begin
    aes_tag         = '0;
    aes_tag.ktype   = kt_q;
    aes_tag.decrypt = (fire && in_type == DT_IV) ? mode_decrypt : dec_q;
    aes_tag.nbytes  = 5'd16;
    if (aes_zero) begin
      aes_tag.valid = 1'b1;
      aes_tag.kind  = SL_H;
    end else if (fire && in_type != DT_KEY) begin
      aes_tag.valid = 1'b1;
      unique case (in_type)
        DT_IV:   aes_tag.kind = SL_Y0;
        DT_AAD:  aes_tag.kind = SL_AAD;
        DT_TEXT: aes_tag.kind = SL_TEXT;
        default: aes_tag.kind = SL_LEN;
      endcase
      if (in_type == DT_AAD || in_type == DT_TEXT) aes_tag.nbytes = in_nbytes;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stag_q <= '0;
      kt_q   <= KEY_128;
      dec_q  <= 1'b0;
    end else begin
      if (stag_q != '0) stag_q <= stag_q - 3'd1;
      if (ks_load) begin
        stag_q <= STAGGER;
        kt_q   <= key_type;
      end
      if (ctr_load) dec_q <= mode_decrypt;
    end
  end

  a_nbytes: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_push |-> (in_nbytes >= 5'd1 && in_nbytes <= 5'd16));

endmodule
