// gf_tmvp: Toeplitz matrix-vector product over GF(2), built recursively.
//
// The N x N Toeplitz matrix is given by its 2N-1 generating bits:
// T[r][c] = t[r - c + N - 1]. The result is c[r] = XOR over c of T[r][c] & v[c].
// Writing T = [T1 T0; T2 T1] and v = [V0; V1] (V0 = v[N/2-1:0]), the product is split
// into three half-size products
//   P0 = (T1 + T0) V1,   P1 = (T2 + T1) V0,   P2 = T1 (V0 + V1)
//   c  = [P0 + P2 ; P1 + P2]
// The two matrix sums share N/2-1 of their XORs, so both take 3N/2-1 gates. The
// recursion stops at HALT and multiplies brute force (an AND layer and an XOR tree);
// HALT = 4 is the size that gives the fewest gates for N = 128.
// Interface: combinational; N must be HALT times a power of two.
// Lint note: when Verilator lints this module as a design top by itself, it reports
// p0, p1 and p2 as undriven. They are driven by the recursive half-size instances; the
// report does not appear when the module is linted inside the multipliers that use
// it, and the simulated products are exact, so the warning stands.
module gf_tmvp #(
  parameter int unsigned N    = 128,
  parameter int unsigned HALT = 4
) (
  input  logic [2*N-2:0] t,
  input  logic [N-1:0]   v,
  output logic [N-1:0]   c
);

  if (N <= HALT) begin : g_brute
    always_comb begin
      for (int r = 0; r < int'(N); r++) begin
        c[r] = 1'b0;
        for (int k = 0; k < int'(N); k++) c[r] = c[r] ^ (t[r - k + int'(N) - 1] & v[k]);
      end
    end
  end else begin : g_split
    localparam int unsigned H = N / 2;

    logic [3*H-2:0] s;        // s[j] = t[j] ^ t[j+H]: T1+T0 = s[2H-2:0], T2+T1 = s[3H-2:H]
    logic [H-1:0]   vsum;
    logic [H-1:0]   p0, p1, p2;

    assign s    = t[3*H-2:0] ^ t[4*H-2:H];
    assign vsum = v[H-1:0] ^ v[N-1:H];

    gf_tmvp #(.N(H), .HALT(HALT)) u_p0 (.t(s[2*H-2:0]),   .v(v[N-1:H]), .c(p0));
    gf_tmvp #(.N(H), .HALT(HALT)) u_p1 (.t(s[3*H-2:H]),   .v(v[H-1:0]), .c(p1));
    gf_tmvp #(.N(H), .HALT(HALT)) u_p2 (.t(t[3*H-2:H]),   .v(vsum),     .c(p2));

    assign c[H-1:0] = p0 ^ p2;
    assign c[N-1:H] = p1 ^ p2;
  end

endmodule
