// gf_ka_mul: recursive Karatsuba polynomial multiplier over GF(2).
//
// Returns the unreduced product of two polynomials of N coefficients (2N-1 result
// coefficients). Each level splits A = x^(N/2) Ah + Al and B likewise and forms
//   D0 = Al Bl,  D2 = Ah Bh,  D1 = (Ah + Al)(Bh + Bl)
//   C' = x^N D2 + x^(N/2) (D1 + D0 + D2) + D0
// so three half-size products replace four. Below HALT the product is formed brute
// force (schoolbook AND/XOR). HALT = 4 gives the fewest gates for N = 128.
// Interface: combinational; bit i is the coefficient of x^i. N must be HALT times a
// power of two.
// Lint note: when Verilator lints this module as a design top by itself, it reports
// d0, d1 and d2 as undriven. They are driven by the recursive half-size instances; the
// report does not appear when the module is linted inside the multipliers that use
// it, and the simulated products are exact, so the warning stands.
module gf_ka_mul #(
  parameter int unsigned N    = 128,
  parameter int unsigned HALT = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] c
);

  if (N <= HALT) begin : g_brute
    always_comb begin
      c = '0;
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++)
          c[i+j] = c[i+j] ^ (a[i] & b[j]);
    end
  end else begin : g_split
    localparam int unsigned H = N / 2;

    logic [2*H-2:0] d0, d1, d2;
    logic [2*H-2:0] mid;

    gf_ka_mul #(.N(H), .HALT(HALT)) u_d0 (.a(a[H-1:0]), .b(b[H-1:0]), .c(d0));
    gf_ka_mul #(.N(H), .HALT(HALT)) u_d2 (.a(a[N-1:H]), .b(b[N-1:H]), .c(d2));
    gf_ka_mul #(.N(H), .HALT(HALT)) u_d1 (.a(a[N-1:H] ^ a[H-1:0]),
                                          .b(b[N-1:H] ^ b[H-1:0]), .c(d1));

    assign mid = d1 ^ d0 ^ d2;

    always_comb begin
      c = '0;
      c[2*H-2:0]       = d0;
      c[2*N-2:N]       = d2;
      c[H +: 2*H-1]    = c[H +: 2*H-1] ^ mid;
    end
  end

endmodule
