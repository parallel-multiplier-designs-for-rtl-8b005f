// tb_aes_pipeline: streams blocks back to back through the pipelined AES block for
// each key length, with round keys from a reference expansion, and checks each
// ciphertext and that it appears exactly Nr = 10/12/14 clocks after its input. The
// FIPS-197 examples are among the blocks. A gap in the stream checks that empty
// slots stay empty.
module tb_aes_pipeline;
  import gcm_pkg::*;
  import gcm_ref_pkg::*;

  logic               clk = 0, rst_n = 0;
  logic [14:0][127:0] rk;
  logic [127:0]       in_block, out_block;
  slot_tag_t          in_tag, out_tag;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes_pipeline dut (.clk, .rst_n, .rk, .in_block, .in_tag, .out_block, .out_tag);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic [127:0] exp_q [$];
  int           due_q [$];

  always @(negedge clk) begin
    if (out_tag.valid) begin
      checks += 2;
      if (exp_q.size() == 0) failures++;
      else begin
        if (out_block !== exp_q.pop_front()) failures++;
        if (cycle != due_q.pop_front()) failures++;
      end
    end
  end

  task automatic stream(logic [255:0] key, int t, int n);
    logic [127:0] rks [15];
    ref_expand(key, t, rks);
    for (int i = 0; i < 15; i++) rk[i] = rks[i];
    for (int i = 0; i < n; i++) begin
      logic [127:0] pt;
      @(negedge clk);
      pt = (i == 0) ? 128'h00112233445566778899aabbccddeeff : {$urandom, $urandom, $urandom, $urandom};
      in_block = pt;
      in_tag = '0;
      in_tag.valid = (i != 5);
      in_tag.kind = SL_TEXT;
      in_tag.ktype = key_type_e'(t);
      if (i != 5) begin
        exp_q.push_back(ref_aes(key, t, pt));
        due_q.push_back(cycle + 10 + 2 * t);
      end
    end
    @(negedge clk);
    in_tag = '0;
    repeat (16) @(negedge clk);
  endtask

  initial begin
    in_tag = '0;
    in_block = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    stream({128'h000102030405060708090a0b0c0d0e0f, 128'd0}, 0, 20);
    stream({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'd0}, 1, 20);
    stream(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 2, 20);
    checks++;
    if (exp_q.size() != 0) failures++;
    checks++;  // FIPS-197 C.3 known answer
    if (ref_aes(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 2,
                128'h00112233445566778899aabbccddeeff) !== 128'h8ea2b7ca516745bfeafc49904b496089) failures++;
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
