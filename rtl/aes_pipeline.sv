// aes_pipeline: outer-pipelined AES encryption block for 128-, 192- and 256-bit keys.
//
// Thirteen full rounds R1..R13, each followed by a 128-bit pipeline register, and one
// final round (no MixColumns) with its own output register. The input block is XORed
// with round key 0 and goes straight into R1. A block's key type travels with it in
// a side tag; the final round takes its state from R9, R11 or R13 for 10, 12 or 14
// rounds, so the latency is 10, 12 or 14 clocks from in_valid to out_valid. Each
// round reads its own round key register rk[s]; the final round reads rk[Nr] of the
// block's key type. At most one of the three taps may hold a block that is due for
// the final round in any cycle: when a key change goes from a longer to a shorter key
// the control unit staggers the input so that this holds, and an assertion checks it.
// Interface: in_valid/in_block/in_tag enter in the same cycle; out_valid/out_block/
// out_tag leave Nr clocks later. No back-pressure.
module aes_pipeline #(
  parameter gcm_pkg::sbox_e SBOX = gcm_pkg::SBOX_LUT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [14:0][127:0]     rk,
  input  logic [127:0]           in_block,
  input  gcm_pkg::slot_tag_t     in_tag,     // in_tag.valid qualifies the block
  output logic [127:0]           out_block,
  output gcm_pkg::slot_tag_t     out_tag
);
  import gcm_pkg::*;

  logic [127:0] st_d [1:13];
  logic [127:0] st_q [1:13];
  slot_tag_t    tg_q [1:13];
  logic [127:0] fin_in, fin_out;
  slot_tag_t    fin_tag;
  logic [3:0]   fin_sel;

  aes_round #(.FINAL(1'b0), .SBOX(SBOX)) u_r1 (
    .state_in(in_block ^ rk[0]), .round_key(rk[1]), .state_out(st_d[1]));

  for (genvar s = 2; s <= 13; s++) begin : g_round
    aes_round #(.FINAL(1'b0), .SBOX(SBOX)) u_r (
      .state_in(st_q[s-1]), .round_key(rk[s]), .state_out(st_d[s]));
  end

  // A block leaves the round pipeline after stage Nr-1
  function automatic logic exits_at(slot_tag_t t, int s);
    return t.valid && (int'(num_rounds(t.ktype)) - 1 == s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= 13; s++) tg_q[s] <= '0;
    end else begin
      tg_q[1] <= in_tag;
      for (int s = 2; s <= 13; s++) begin
        tg_q[s]       <= tg_q[s-1];
        tg_q[s].valid <= tg_q[s-1].valid && !exits_at(tg_q[s-1], s-1);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 1; s <= 13; s++) st_q[s] <= st_d[s];
  end

  // Final round input selected by the key type of the exiting block
  always_comb begin
    fin_in  = st_q[13];
    fin_tag = '0;
    fin_sel = 4'd14;
    if (exits_at(tg_q[9], 9)) begin
      fin_in = st_q[9];  fin_tag = tg_q[9];  fin_sel = 4'd10;
    end else if (exits_at(tg_q[11], 11)) begin
      fin_in = st_q[11]; fin_tag = tg_q[11]; fin_sel = 4'd12;
    end else if (exits_at(tg_q[13], 13)) begin
      fin_in = st_q[13]; fin_tag = tg_q[13]; fin_sel = 4'd14;
    end
  end

  aes_round #(.FINAL(1'b1), .SBOX(SBOX)) u_final (
    .state_in(fin_in), .round_key(rk[fin_sel]), .state_out(fin_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_tag <= '0;
    else        out_tag <= fin_tag;
  end

  always_ff @(posedge clk) out_block <= fin_out;

  // Two blocks of different key lengths must never reach the final round together
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({exits_at(tg_q[9], 9), exits_at(tg_q[11], 11), exits_at(tg_q[13], 13)}));

endmodule
