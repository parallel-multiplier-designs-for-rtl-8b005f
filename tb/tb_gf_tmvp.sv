// tb_gf_tmvp: checks the recursive Toeplitz matrix-vector product against a brute
// force product of the same matrix, for N = 128 (halting at 4, the default), N = 16
// halting at 2 and N = 4 (brute force only), on random generating vectors.
module tb_gf_tmvp;
  logic [254:0] t128;
  logic [127:0] v128, c128;
  logic [30:0]  t16;
  logic [15:0]  v16, c16;
  logic [6:0]   t4;
  logic [3:0]   v4, c4;
  int checks = 0, failures = 0;

  gf_tmvp #(.N(128), .HALT(4)) u128 (.t(t128), .v(v128), .c(c128));
  gf_tmvp #(.N(16),  .HALT(2)) u16  (.t(t16),  .v(v16),  .c(c16));
  gf_tmvp #(.N(4),   .HALT(4)) u4   (.t(t4),   .v(v4),   .c(c4));

  function automatic logic [127:0] brute(logic [254:0] t, logic [127:0] v, int n);
    logic [127:0] r;
    r = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) r[i] ^= t[i - j + n - 1] & v[j];
    return r;
  endfunction

  initial begin
    for (int k = 0; k < 300; k++) begin
      for (int w = 0; w < 8; w++) t128[32*w +: 32] = $urandom;
      v128 = {$urandom, $urandom, $urandom, $urandom};
      t16  = 31'($urandom);
      v16  = 16'($urandom);
      t4   = 7'($urandom);
      v4   = 4'($urandom);
      #1;
      checks += 3;
      if (c128 !== brute(t128, v128, 128))     failures++;
      if (c16  !== 16'(brute(255'(t16), 128'(v16), 16))) failures++;
      if (c4   !== 4'(brute(255'(t4), 128'(v4), 4)))     failures++;
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
