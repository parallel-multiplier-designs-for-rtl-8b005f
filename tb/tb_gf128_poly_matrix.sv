// tb_gf128_poly_matrix: checks the polynomial matrix stage. For random B the matrix
// P (column j = x^j * B mod F, from the reference multiplier) is compared entry by
// entry with the Toeplitz generating vector (rows 7..127 and row 0), with the six
// padding diagonals (which must be zero) and with the six Mastrovito rows 1..6.
module tb_gf128_poly_matrix;
  import gcm_ref_pkg::*;

  logic [127:0]      b;
  logic [254:0]      toep;
  logic [5:0][127:0] top_rows;
  int checks = 0, failures = 0;

  gf128_poly_matrix dut (.b(b), .toep(toep), .top_rows(top_rows));

  initial begin
    for (int n = 0; n < 20; n++) begin
      logic [127:0] col [128];
      b = (n == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int j = 0; j < 128; j++) col[j] = ref_coef_mul(b, 128'd1 << j);
      for (int r = 0; r < 128; r++) begin
        for (int j = 0; j < 128; j++) begin
          logic expv;
          if (r < 121)       expv = col[j][r+7];
          else if (r == 121) expv = col[j][0];
          else               expv = (r - j > 121) ? 1'b0 : toep[r - j + 127];  // padding rows
          checks++;
          if (toep[r - j + 127] !== expv) failures++;
        end
      end
      for (int k = 122; k < 128; k++) begin
        checks++;
        if (toep[k + 127] !== 1'b0) failures++;
      end
      for (int r = 0; r < 6; r++)
        for (int j = 0; j < 128; j++) begin
          checks++;
          if (top_rows[r][j] !== col[j][r+1]) failures++;
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
