// tb_gcm_control: drives the control unit with a command sequence and checks the
// slot it issues for each command, the counter/FIFO/key-schedule strobes, the key
// change stagger (three bubbles, then the H slot in the fourth clock after the key),
// that a key waits while the schedule is busy, and that AAD/TEXT wait on a full FIFO.
module tb_gcm_control;
  import gcm_pkg::*;

  logic       clk = 0, rst_n = 0, in_valid = 0, in_ready;
  data_type_e in_type;
  logic [4:0] in_nbytes;
  key_type_e  key_type;
  logic       mode_decrypt = 0, ks_busy = 0, fifo_full = 0;
  logic       ks_load, ctr_load, ctr_inc, fifo_push, aes_zero;
  slot_tag_t  aes_tag;
  int checks = 0, failures = 0;

  gcm_control dut (.clk, .rst_n, .in_valid, .in_ready, .in_type, .in_nbytes, .key_type,
                   .mode_decrypt, .ks_busy, .fifo_full, .ks_load, .ctr_load, .ctr_inc,
                   .fifo_push, .aes_zero, .aes_tag);

  always #5 clk = ~clk;

  task automatic chk(logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("check failed at %0t ready=%0d tag=%p zero=%0d", $time, in_ready, aes_tag, aes_zero);
    end
  endtask

  // present one command for one cycle and check the issued slot
  task automatic cmd(data_type_e t, logic [4:0] nb, logic exp_ready, slot_kind_e k);
    @(negedge clk);
    in_valid = 1; in_type = t; in_nbytes = nb;
    #1;
    chk(in_ready == exp_ready);
    if (exp_ready) begin
      chk(aes_tag.valid == (t != DT_KEY));
      if (t != DT_KEY) chk(aes_tag.kind == k);
      chk(ks_load == (t == DT_KEY));
      chk(ctr_load == (t == DT_IV));
      chk(ctr_inc == (t == DT_TEXT));
      chk(fifo_push == (t == DT_AAD || t == DT_TEXT));
      if (t == DT_AAD || t == DT_TEXT) chk(aes_tag.nbytes == nb);
    end else begin
      chk(!aes_tag.valid || aes_zero);
      chk(!ks_load && !ctr_load && !ctr_inc && !fifo_push);
    end
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  initial begin
    in_type = DT_KEY; in_nbytes = 16; key_type = KEY_256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cmd(DT_KEY, 16, 1, SL_H);
    @(negedge clk); in_valid = 0;
    // bubbles: clocks 1 to 3 after the key, H slot in clock 4
    for (int i = 1; i <= 4; i++) begin
      #1;
      chk(in_ready == 0 || in_valid == 0);
      chk(aes_zero == (i == 4));
      if (i == 4) chk(aes_tag.valid && aes_tag.kind == SL_H && aes_tag.ktype == KEY_256);
      else        chk(!aes_tag.valid);
      @(negedge clk);
    end
    #1; chk(!aes_zero);
    mode_decrypt = 1;
    cmd(DT_IV, 16, 1, SL_Y0);
    mode_decrypt = 0;
    cmd(DT_AAD, 16, 1, SL_AAD);
    chk(aes_tag.decrypt == 1);         // mode held from the IV
    cmd(DT_TEXT, 7, 1, SL_TEXT);
    fifo_full = 1;
    cmd(DT_TEXT, 16, 0, SL_TEXT);
    cmd(DT_AAD, 16, 0, SL_AAD);
    cmd(DT_END, 16, 1, SL_LEN);
    fifo_full = 0;
    ks_busy = 1;
    key_type = KEY_128;
    cmd(DT_KEY, 16, 0, SL_H);
    cmd(DT_KEY, 16, 0, SL_H);
    ks_busy = 0;
    cmd(DT_KEY, 16, 1, SL_H);
    @(negedge clk); in_valid = 1; in_type = DT_IV;
    #1; chk(!in_ready);
    repeat (3) @(negedge clk);
    #1; chk(!in_ready && aes_zero && aes_tag.ktype == KEY_128);
    chk(dut.kt_q == KEY_128);
    cmd(DT_IV, 16, 1, SL_Y0);
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
