// gf128_poly_matrix: the "polynomial matrix calculations" stage of the Fan-Hasan
// GF(2^128) multiplier.
//
// For an operand B(x) the polynomial matrix P has column j equal to x^j * B(x) mod F(x),
// F(x) = x^128 + x^7 + x^2 + x + 1, so that A*B mod F = P * a. For the GCM polynomial,
// rows 7..127 of P together with row 0 placed below them form a 122 x 128 Toeplitz
// block. That block is extended to a full 128 x 128 Toeplitz matrix by padding the
// first column with six zeros. A Toeplitz matrix is fixed by its first row and column,
// so the stage outputs them as a 255-bit generating vector:
//   T[r][c] = toep[r - c + 127], where row r < 121 holds result coefficient r + 7,
//   row 121 holds coefficient 0 and rows 122..127 are padding.
// The remaining rows 1..6 of P, which are not Toeplitz, are passed on in full for the
// small Mastrovito part of the multiplier.
// Interface: b is a coefficient vector (bit i = coefficient of x^i). Purely
// combinational, no clock. The row split and the padding follow the multiplier
// design being built; computing the columns by repeated multiplication by x is the
// plain form of the column recurrence, and XOR sharing is left to synthesis.
module gf128_poly_matrix (
  input  logic [127:0]      b,
  output logic [254:0]      toep,      // Toeplitz generating vector
  output logic [5:0][127:0] top_rows   // top_rows[k] = row k+1 of P
);
  import gcm_pkg::*;

  localparam int unsigned M     = 128;
  localparam int unsigned TROWS = 122;  // rows of P that are Toeplitz

  logic [M-1:0] col [M];  // col[j] = x^j * b mod F

  always_comb begin
    col[0] = b;
    for (int j = 1; j < M; j++) col[j] = gf128_mulx(col[j-1]);
  end

  // Toeplitz row r of the extended matrix maps to row r+7 of P (r < 121), to row 0
  // (r = 121), and to padding beyond.
  for (genvar k = 0; k < 2*M-1; k++) begin : g_toep
    localparam int D  = k - (M - 1);           // d = r - c
    localparam int R  = (D > 0) ? D : 0;       // representative row
    localparam int C  = R - D;                 // representative column
    localparam int PR = (R < TROWS - 1) ? R + 7 : 0;
    if (D <= int'(TROWS) - 1) begin : g_val
      assign toep[k] = col[C][PR];
    end else begin : g_pad
      assign toep[k] = 1'b0;
    end
  end

  for (genvar r = 0; r < 6; r++) begin : g_top
    for (genvar j = 0; j < M; j++) begin : g_col
      assign top_rows[r][j] = col[j][r+1];
    end
  end

endmodule
