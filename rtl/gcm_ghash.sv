// gcm_ghash: the authentication half of the GCM datapath: hash key register,
// input multiplexer, chained GF(2^128) multiplier, E_K(Y0) buffer, tag and output
// register.
//
// It works on the slots leaving the AES pipeline (one per clock at most):
//   H     the AES result is AES_K(0^128) and becomes the hash key H
//   Y0    the AES result E_K(Y0) is buffered for the tag; the hash restarts at 0
//   AAD   the FIFO block (masked to nbytes) is hashed
//   TEXT  C = P ^ E_K(Yi) (masked) is output; the ciphertext is hashed, which is C
//         when encrypting and the FIFO block itself when decrypting
//   LEN   the length block len(A) || len(C) is hashed, then T = X ^ E_K(Y0)
// Pipeline: the multiplexer output is registered (stage 1, easing the multiplier's
// input timing); stage 2 computes X <- (X ^ M) * H in one clock, so the feedback loop
// is closed inside one parallel multiplier; stage 3 is the output register, which
// carries either a text block or the tag. A text block travels through matching delay
// registers so both kinds leave in slot order, 3 clocks after the AES output. With the
// 10/12/14-clock AES this gives the 13/15/17-clock overall latency.
// Bit order: blocks are converted to coefficient vectors by bit reversal around the
// multiplier. MULT selects the multiplier architecture.
module gcm_ghash #(
  parameter gcm_pkg::mult_e MULT = gcm_pkg::MUL_FH,
  parameter int unsigned    HALT = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [127:0]       aes_block,   // AES output
  input  gcm_pkg::slot_tag_t aes_tag,
  input  logic [127:0]       fifo_block,  // head of the input FIFO
  input  logic [127:0]       len_block,
  output logic               out_valid,
  output logic               out_is_tag,
  output logic [127:0]       out_data,
  output logic [4:0]         out_nbytes
);
  import gcm_pkg::*;

  logic [127:0] h_q;       // hash key, coefficient vector
  logic [127:0] ek0_q;     // E_K(Y0) of the current message
  logic         first_q;   // next hashed block starts the chain from 0

  // stage 1: multiplexer register
  logic         m_valid_q, m_first_q, m_last_q, m_text_q;
  logic [127:0] m_q, m_ek0_q, m_out_q;
  logic [4:0]   m_nbytes_q;
  // stage 2: multiplier / X register
  logic [127:0] x_q;
  logic         x_last_q, x_text_q;
  logic [127:0] x_ek0_q, x_out_q;
  logic [4:0]   x_nbytes_q;

  logic [127:0] mask, fifo_m, text, mux_d;
  logic         hashed;

  assign mask   = byte_mask(aes_tag.nbytes);
  assign fifo_m = fifo_block & mask;
  assign text   = (fifo_block ^ aes_block) & mask;
  assign hashed = aes_tag.valid && (aes_tag.kind inside {SL_AAD, SL_TEXT, SL_LEN});

  always_comb begin
    unique case (aes_tag.kind)
      SL_TEXT: mux_d = aes_tag.decrypt ? fifo_m : text;
      SL_LEN:  mux_d = len_block;
      default: mux_d = fifo_m;
    endcase
  end

  // hash key, E_K(Y0) and chain start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q     <= '0;
      ek0_q   <= '0;
      first_q <= 1'b1;
    end else if (aes_tag.valid) begin
      if (aes_tag.kind == SL_H)  h_q <= bitrev128(aes_block);
      if (aes_tag.kind == SL_Y0) begin
        ek0_q   <= aes_block;
        first_q <= 1'b1;
      end
      if (hashed) first_q <= 1'b0;
    end
  end

  // stage 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid_q <= 1'b0;
      m_last_q  <= 1'b0;
      m_text_q  <= 1'b0;
    end else begin
      m_valid_q <= hashed;
      m_last_q  <= aes_tag.valid && aes_tag.kind == SL_LEN;
      m_text_q  <= aes_tag.valid && aes_tag.kind == SL_TEXT;
    end
  end

  always_ff @(posedge clk) begin
    m_q        <= mux_d;
    m_first_q  <= first_q;
    m_ek0_q    <= ek0_q;
    m_out_q    <= text;
    m_nbytes_q <= aes_tag.nbytes;
  end

  // stage 2: X <- (X ^ M) * H
  logic [127:0] mul_a, mul_c;

  assign mul_a = bitrev128((m_first_q ? 128'd0 : x_q) ^ m_q);

  gf128_mul #(.MULT(MULT), .HALT(HALT)) u_mul (.a(mul_a), .b(h_q), .c(mul_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q      <= '0;
      x_last_q <= 1'b0;
      x_text_q <= 1'b0;
    end else begin
      if (m_valid_q) x_q <= bitrev128(mul_c);
      x_last_q <= m_last_q;
      x_text_q <= m_text_q;
    end
  end

  always_ff @(posedge clk) begin
    x_ek0_q    <= m_ek0_q;
    x_out_q    <= m_out_q;
    x_nbytes_q <= m_nbytes_q;
  end

  // stage 3: output register (text block or tag)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_is_tag <= 1'b0;
      out_data   <= '0;
      out_nbytes <= '0;
    end else begin
      out_valid  <= x_last_q || x_text_q;
      out_is_tag <= x_last_q;
      out_data   <= x_last_q ? (x_q ^ x_ek0_q) : x_out_q;
      out_nbytes <= x_last_q ? 5'd16 : x_nbytes_q;
    end
  end

endmodule
