// tb_gcm_len_block: counts random AAD and text blocks of 1..16 bytes and checks the
// length block (bit counts, len(A) in the upper half) after every step, and the clear.
module tb_gcm_len_block;
  logic         clk = 0, rst_n = 0, clear = 0, add_aad = 0, add_text = 0;
  logic [4:0]   nbytes;
  logic [127:0] len_block;
  logic [63:0]  la, lc;
  int checks = 0, failures = 0;

  gcm_len_block dut (.clk, .rst_n, .clear, .add_aad, .add_text, .nbytes, .len_block);

  always #5 clk = ~clk;

  initial begin
    la = 0; lc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      checks++;
      if (len_block !== {la, lc}) failures++;
      clear    = ($urandom_range(0, 40) == 0);
      add_aad  = $urandom_range(0, 1);
      add_text = !add_aad && $urandom_range(0, 1);
      nbytes   = 5'($urandom_range(1, 16));
      @(posedge clk);
      if (clear) begin la = 0; lc = 0; end
      else begin
        if (add_aad)  la += 64'(8 * nbytes);
        if (add_text) lc += 64'(8 * nbytes);
      end
    end
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
