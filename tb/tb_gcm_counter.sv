// tb_gcm_counter: checks Y0 = IV || 0^31 1 on load, +1 on each increment (low 32 bits
// only, wrapping from ffffffff to 0 without touching the IV part), that the new value
// is visible in the same cycle, and that the value holds without load/inc.
module tb_gcm_counter;
  logic         clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [95:0]  iv;
  logic [127:0] y, model;
  int checks = 0, failures = 0;

  gcm_counter dut (.clk, .rst_n, .load, .iv, .inc, .y);

  always #5 clk = ~clk;

  task automatic step(logic l, logic i, logic [95:0] v);
    @(negedge clk);
    load = l; inc = i; iv = v;
    if (l)      model = {v, 32'd1};
    else if (i) model[31:0] = model[31:0] + 1;
    #1;
    checks++;
    if (y !== model) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(1, 0, 96'hcafebabefacedbaddecaf888);
    for (int n = 0; n < 20; n++) step(0, 1, '0);
    step(0, 0, '0);
    step(0, 0, '0);
    step(1, 1, 96'h1234);                      // load wins over inc
    @(negedge clk);
    load = 0; inc = 0;
    force dut.y_q = {96'habc, 32'hffff_fffe};
    @(negedge clk);
    release dut.y_q;
    model = {96'habc, 32'hffff_fffe};
    step(0, 1, '0);
    step(0, 1, '0);                            // wraps to 0
    checks++;
    if (y !== {96'habc, 32'h0}) failures++;
    for (int n = 0; n < 50; n++) step($urandom_range(0, 3) == 0, $urandom_range(0, 1), {$urandom, $urandom, $urandom});
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
