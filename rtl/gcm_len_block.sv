// gcm_len_block: builds the GCM length block len(A) || len(C).
//
// Two 64-bit bit counters, one for the additional authenticated data and one for the
// text, are cleared when a message starts and advanced by 8 * nbytes for each AAD or
// text block as it reaches the hash stage. The length block is their concatenation,
// len(A) in the upper 64 bits.
// Interface: clear has priority; add_aad/add_text with nbytes (1..16); len_block is
// the registered value, so a block counted in cycle t is included from cycle t+1.
module gcm_len_block (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         add_aad,
  input  logic         add_text,
  input  logic [4:0]   nbytes,
  output logic [127:0] len_block
);

  logic [63:0] len_a_q, len_c_q;
  logic [63:0] nbits;

  assign nbits     = {56'd0, nbytes, 3'b000};
  assign len_block = {len_a_q, len_c_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_a_q <= '0;
      len_c_q <= '0;
    end else if (clear) begin
      len_a_q <= '0;
      len_c_q <= '0;
    end else begin
      if (add_aad)  len_a_q <= len_a_q + nbits;
      if (add_text) len_c_q <= len_c_q + nbits;
    end
  end

endmodule
