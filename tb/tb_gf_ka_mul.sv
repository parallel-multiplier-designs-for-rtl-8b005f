// tb_gf_ka_mul: checks the recursive Karatsuba polynomial multiplier (unreduced
// product) against a shift-and-XOR carry-less product, for N = 128 halting at 4
// (the default) and N = 32 halting at 2, on random and all-ones operands.
module tb_gf_ka_mul;
  import gcm_ref_pkg::*;

  logic [127:0] a, b;
  logic [254:0] c;
  logic [31:0]  a32, b32;
  logic [62:0]  c32;
  int checks = 0, failures = 0;

  gf_ka_mul #(.N(128), .HALT(4)) u128 (.a(a), .b(b), .c(c));
  gf_ka_mul #(.N(32),  .HALT(2)) u32  (.a(a32), .b(b32), .c(c32));

  task automatic check(logic [127:0] ta, logic [127:0] tb_);
    a = ta; b = tb_; a32 = ta[31:0]; b32 = tb_[31:0];
    #1;
    checks += 2;
    if (c !== ref_clmul(ta, tb_)) failures++;
    if (c32 !== 63'(ref_clmul(128'(ta[31:0]), 128'(tb_[31:0])))) failures++;
  endtask

  initial begin
    check('1, '1);
    check(128'd1, 128'd1);
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
