// tb_gf128_reduce: checks the reduction matrix: random 255-coefficient polynomials
// and every single power x^k (k = 0..254) are reduced and compared with polynomial
// long division by x^128 + x^7 + x^2 + x + 1.
module tb_gf128_reduce;
  logic [254:0] cp;
  logic [127:0] c;
  int checks = 0, failures = 0;

  gf128_reduce dut (.cp(cp), .c(c));

  function automatic logic [127:0] longdiv(logic [254:0] p);
    logic [255:0] f;
    for (int k = 254; k >= 128; k--) begin
      if (p[k]) begin
        f = '0;
        f[k] = 1'b1; f[k-121] = 1'b1; f[k-126] = 1'b1; f[k-127] = 1'b1; f[k-128] = 1'b1;
        p = p ^ f[254:0];
      end
    end
    return p[127:0];
  endfunction

  task automatic check(logic [254:0] v);
    cp = v;
    #1;
    checks++;
    if (c !== longdiv(v)) failures++;
  endtask

  initial begin
    for (int k = 0; k < 255; k++) check(255'd1 << k);
    for (int n = 0; n < 300; n++) begin
      logic [255:0] r;
      for (int w = 0; w < 8; w++) r[32*w +: 32] = $urandom;
      check(r[254:0]);
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
