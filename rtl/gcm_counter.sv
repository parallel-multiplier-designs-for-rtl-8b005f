// gcm_counter: the Y counter that produces the counter blocks encrypted by AES.
//
// On load it forms Y0 = IV || 0^31 1 from a 96-bit IV; on inc it forms
// Y(i) = Y(i-1) + 1, incrementing the low 32 bits modulo 2^32 as GCM specifies. A
// register holds the current value, but the new value is also driven combinationally
// on y so that the block enters the AES pipeline in the same clock: the counter adds
// no latency.
// Interface: load has priority over inc; y is valid in the cycle of load/inc and
// otherwise shows the held value.
module gcm_counter (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [95:0]  iv,
  input  logic         inc,
  output logic [127:0] y
);

  logic [127:0] y_q;

  always_comb begin
    if (load)     y = {iv, 32'h0000_0001};
    else if (inc) y = {y_q[127:32], y_q[31:0] + 32'd1};
    else          y = y_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_q <= '0;
    else        y_q <= y;
  end

endmodule
