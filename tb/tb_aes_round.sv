// tb_aes_round: checks a full round and a final round (no MixColumns), with the LUT
// and the composite S-box, against a reference round on 200 random states and keys.
module tb_aes_round;
  import gcm_pkg::*;
  import gcm_ref_pkg::*;

  logic [127:0] s, k, o_full, o_final, o_comp;
  int checks = 0, failures = 0;

  aes_round #(.FINAL(1'b0)) u_full  (.state_in(s), .round_key(k), .state_out(o_full));
  aes_round #(.FINAL(1'b1)) u_final (.state_in(s), .round_key(k), .state_out(o_final));
  aes_round #(.FINAL(1'b0), .SBOX(SBOX_COMPOSITE)) u_comp (.state_in(s), .round_key(k), .state_out(o_comp));

  initial begin
    for (int n = 0; n < 200; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks += 3;
      if (o_full  !== ref_round(s, k, 1'b0)) failures++;
      if (o_final !== ref_round(s, k, 1'b1)) failures++;
      if (o_comp  !== ref_round(s, k, 1'b0)) failures++;
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
