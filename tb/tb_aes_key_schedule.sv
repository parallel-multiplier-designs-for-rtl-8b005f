// tb_aes_key_schedule: loads 128-, 192- and 256-bit keys (FIPS-197 example keys and
// random ones) and checks every round key register against a reference expansion.
// It also checks the timing: round key c is written on the (c+1)-th clock after the
// load, busy lasts Nr+1 clocks, and registers not yet reached keep the previous key's
// round keys (so blocks in flight can finish with the old key).
module tb_aes_key_schedule;
  import gcm_pkg::*;
  import gcm_ref_pkg::*;

  logic               clk = 0, rst_n = 0, load = 0;
  logic [255:0]       key;
  key_type_e          kt;
  logic [14:0][127:0] rk;
  logic               busy;
  int checks = 0, failures = 0;

  aes_key_schedule dut (.clk, .rst_n, .load, .key, .key_type(kt), .rk, .busy);

  always #5 clk = ~clk;

  task automatic run(logic [255:0] k, int t);
    logic [127:0] exp [15];
    logic [127:0] old [15];
    int nr, cyc;
    nr = 10 + 2 * t;
    ref_expand(k, t, exp);
    for (int i = 0; i < 15; i++) old[i] = rk[i];
    @(negedge clk);
    key = k; kt = key_type_e'(t); load = 1;
    @(negedge clk);
    load = 0;
    cyc = 0;
    while (busy) begin
      @(negedge clk);
      cyc++;
      // after cyc clocks of busy, round keys 0..cyc-1 are new, the rest old
      for (int i = 0; i < 15; i++) begin
        checks++;
        if (i < cyc && i <= nr) begin
          if (rk[i] !== exp[i]) failures++;
        end else if (rk[i] !== old[i]) failures++;
      end
    end
    checks++;
    if (cyc != nr + 1) begin
      failures++;
      $display("busy lasted %0d clocks, expected %0d", cyc, nr + 1);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run({128'h000102030405060708090a0b0c0d0e0f, 128'd0}, 0);
    checks++;  // FIPS-197 A.1 last round key
    if (rk[10] !== 128'h13111d7fe3944a17f307a78b4d2b30c5) failures++;
    run({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'd0}, 1);
    run(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 2);
    run({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'd0}, 0);
    checks++;  // FIPS-197 A.1: w[43] = b6630ca6
    if (rk[10][31:0] !== 32'hb6630ca6) failures++;
    for (int n = 0; n < 6; n++)
      run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}, n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
