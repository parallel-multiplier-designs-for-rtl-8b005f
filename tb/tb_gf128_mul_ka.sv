// tb_gf128_mul_ka: self-checking test of the Karatsuba GF(2^128) multiplier.
// Products of corner operands (0, 1, x, x^127, all ones) and of 400 random pairs are
// compared with a bit-serial reference multiplication. Combinational, so each vector
// settles after a 1 ns step; a watchdog ends a hung run.
module tb_gf128_mul_ka;
  import gcm_ref_pkg::*;

  logic [127:0] a, b, c;
  int checks = 0, failures = 0;

  gf128_mul_ka dut (.a(a), .b(b), .c(c));

  task automatic check(logic [127:0] ta, logic [127:0] tb_);
    logic [127:0] exp;
    a = ta;
    b = tb_;
    #1;
    exp = ref_coef_mul(ta, tb_);
    checks++;
    if (c !== exp) begin
      failures++;
      if (failures < 5) $display("MISMATCH a=%h b=%h got=%h exp=%h", ta, tb_, c, exp);
    end
  endtask

  initial begin
    logic [127:0] corner [5];
    corner[0] = '0; corner[1] = 128'd1; corner[2] = 128'd2;
    corner[3] = {1'b1, 127'd0}; corner[4] = '1;
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int n = 0; n < 400; n++)
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
