// tb_gcm_fifo: random push/pop traffic against a queue model, checking the head
// data and the full/empty flags every cycle; it fills the FIFO to full and drains
// it to empty at least once, and pushes and pops in the same cycle.
module tb_gcm_fifo;
  localparam int DEPTH = 16;
  logic         clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [127:0] din, dout;
  logic         full, empty;
  int checks = 0, failures = 0, saw_full = 0, saw_empty = 0;
  logic [127:0] model [$];

  gcm_fifo #(.WIDTH(128), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int bias;
      bias = (n < 100) ? 3 : (n < 200) ? 1 : 2;   // fill, drain, mixed
      @(negedge clk);
      checks += 2;
      if (full  !== (model.size() == DEPTH)) failures++;
      if (empty !== (model.size() == 0))     failures++;
      if (model.size() > 0) begin
        checks++;
        if (dout !== model[0]) failures++;
      end
      if (full)  saw_full++;
      if (empty) saw_empty++;
      push = !full && ($urandom_range(0, 3) < bias);
      pop  = !empty && ($urandom_range(0, 3) >= bias);
      if (n % 7 == 0 && !full && !empty) begin push = 1; pop = 1; end
      din  = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks += 2;
    if (saw_full == 0)  failures++;
    if (saw_empty == 0) failures++;
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
