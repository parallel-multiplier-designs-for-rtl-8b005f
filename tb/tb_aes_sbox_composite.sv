// tb_aes_sbox_composite: exhaustive check of the S-box: all 256 inputs against an S-box computed
// by searching for each multiplicative inverse, plus three published FIPS-197
// values (00 -> 63, 01 -> 7c, 53 -> ed).
module tb_aes_sbox_composite;
  import gcm_ref_pkg::*;

  logic [7:0] in, out;
  int checks = 0, failures = 0;

  aes_sbox_composite dut (.in(in), .out(out));

  initial begin
    for (int x = 0; x < 256; x++) begin
      in = 8'(x);
      #1;
      checks++;
      if (out !== ref_sbox(8'(x))) failures++;
      if (x == 8'h00 || x == 8'h01 || x == 8'h53) begin
        checks++;
        if (out !== ((x == 0) ? 8'h63 : (x == 1) ? 8'h7c : 8'hed)) failures++;
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
