// tb_gf128_mul: checks the multiplier selector with each of its three architectures
// (Fan-Hasan, Karatsuba, Mastrovito) against a bit-serial reference on 300 random
// operand pairs and a few corner cases.
module tb_gf128_mul;
  import gcm_pkg::*;
  import gcm_ref_pkg::*;

  logic [127:0] a, b, c_fh, c_ka, c_ma;
  int checks = 0, failures = 0;

  gf128_mul #(.MULT(MUL_FH))         u_fh (.a(a), .b(b), .c(c_fh));
  gf128_mul #(.MULT(MUL_KA))         u_ka (.a(a), .b(b), .c(c_ka));
  gf128_mul #(.MULT(MUL_MASTROVITO)) u_ma (.a(a), .b(b), .c(c_ma));

  task automatic check(logic [127:0] ta, logic [127:0] tb_);
    logic [127:0] exp;
    a = ta; b = tb_;
    #1;
    exp = ref_coef_mul(ta, tb_);
    checks += 3;
    if (c_fh !== exp) failures++;
    if (c_ka !== exp) failures++;
    if (c_ma !== exp) failures++;
  endtask

  initial begin
    check('1, '1);
    check(128'd1, {1'b1, 127'd0});
    check({1'b1, 127'd0}, {1'b1, 127'd0});
    for (int n = 0; n < 300; n++)
      check({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
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
