// tb_gcm_ghash: drives the hash/output stage directly with slot sequences as they
// would leave the AES pipeline (random values stand in for AES results), for
// back-to-back messages with and without AAD, partial last blocks, encryption and
// decryption. Checks every text output and tag against a reference GHASH, that each
// output appears exactly 3 clocks after its slot, and that the hash key is taken from
// the H slot.
module tb_gcm_ghash;
  import gcm_pkg::*;
  import gcm_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic [127:0] aes_block, fifo_block, len_block;
  slot_tag_t    aes_tag;
  logic         out_valid, out_is_tag;
  logic [127:0] out_data;
  logic [4:0]   out_nbytes;
  int checks = 0, failures = 0, cycle = 0;

  gcm_ghash dut (.clk, .rst_n, .aes_block, .aes_tag, .fifo_block, .len_block,
                 .out_valid, .out_is_tag, .out_data, .out_nbytes);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  typedef struct { logic [127:0] data; logic is_tag; int due; } exp_t;
  exp_t exp_q [$];

  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      checks += 3;
      if (exp_q.size() == 0) failures++;
      else begin
        e = exp_q.pop_front();
        if (out_data !== e.data)     failures++;
        if (out_is_tag !== e.is_tag) failures++;
        if (cycle != e.due)          failures++;
      end
    end
  end

  logic [127:0] h;

  task automatic slot(slot_kind_e k, logic [127:0] ab, logic [127:0] fb, logic [4:0] nb, logic dec);
    @(negedge clk);
    aes_tag = '0;
    aes_tag.valid = 1; aes_tag.kind = k; aes_tag.nbytes = nb; aes_tag.decrypt = dec;
    aes_block = ab; fifo_block = fb;
  endtask

  task automatic idle();
    @(negedge clk);
    aes_tag = '0;
  endtask

  task automatic message(int na, int nt, logic dec);
    logic [127:0] ek0, x, ab, fb, c, m;
    logic [63:0]  la, lc;
    int nb;
    ek0 = {$urandom, $urandom, $urandom, $urandom};
    slot(SL_Y0, ek0, '0, 16, dec);
    x = 0; la = 0; lc = 0;
    for (int i = 0; i < na; i++) begin
      nb = (i == na - 1) ? $urandom_range(1, 16) : 16;
      fb = {$urandom, $urandom, $urandom, $urandom};
      m  = ref_mask(nb);
      slot(SL_AAD, {$urandom, $urandom, $urandom, $urandom}, fb, 5'(nb), dec);
      x = ref_ghash_mul(x ^ (fb & m), h);
      la += 64'(8 * nb);
    end
    for (int i = 0; i < nt; i++) begin
      nb = (i == nt - 1) ? $urandom_range(1, 16) : 16;
      fb = {$urandom, $urandom, $urandom, $urandom};
      ab = {$urandom, $urandom, $urandom, $urandom};
      m  = ref_mask(nb);
      slot(SL_TEXT, ab, fb, 5'(nb), dec);
      c  = (fb ^ ab) & m;
      exp_q.push_back('{c, 1'b0, cycle + 3});
      x = ref_ghash_mul(x ^ (dec ? (fb & m) : c), h);
      lc += 64'(8 * nb);
    end
    len_block = {la, lc};
    slot(SL_LEN, {$urandom, $urandom, $urandom, $urandom}, '0, 16, dec);
    x = ref_ghash_mul(x ^ {la, lc}, h);
    exp_q.push_back('{x ^ ek0, 1'b1, cycle + 3});
  endtask

  initial begin
    aes_tag = '0; aes_block = '0; fifo_block = '0; len_block = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // GCM test case 2: H = E(0), C = 0388dace..., GHASH = f38cbb1a...
    h = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
    slot(SL_H, h, '0, 16, 0);
    slot(SL_Y0, 128'd0, '0, 16, 0);
    slot(SL_TEXT, 128'h0388dace60b6a392f328c2b971b2fe78, 128'd0, 16, 0);
    exp_q.push_back('{128'h0388dace60b6a392f328c2b971b2fe78, 1'b0, cycle + 3});
    len_block = {64'd0, 64'd128};
    slot(SL_LEN, '0, '0, 16, 0);
    exp_q.push_back('{128'hf38cbb1ad69223dcc3457ae5b6b0f885, 1'b1, cycle + 3});
    idle();
    for (int n = 0; n < 30; n++) begin
      if (n % 10 == 0) begin
        h = {$urandom, $urandom, $urandom, $urandom};
        slot(SL_H, h, '0, 16, 0);
      end
      message($urandom_range(0, 3), $urandom_range(0, 4), n % 3 == 2);
      if (n % 4 == 0) idle();
    end
    repeat (6) idle();
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
