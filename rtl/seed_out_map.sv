// seed_out_map: the output stage of S-box S1 (SEL = 1) or S2 (SEL = 2).
// It takes the tower-field inverse and returns the S-box value
//   S1 = A1 * (DELTA^-1 v)^8 ^ 169,   S2 = A2 * (DELTA^-1 v)^4 ^ 56.
// Inverse isomorphism, the squarings and the affine matrix are all linear
// over GF(2), so they are merged into one 8x8 matrix, as the document
// proposes. The matrix is computed at elaboration by seed_pkg::out_matrix
// from DELTA, A1/A2 and p(x); the hardware is an XOR network plus the
// constant. Purely combinational.
module seed_out_map
  import seed_pkg::*;
#(
  parameter int SEL = 1
) (
  input  gf256_t x,
  output gf256_t y
);
  localparam mat8_t  COLS = out_matrix(SEL);
  localparam gf256_t CST  = (SEL == 1) ? C1 : C2;

  initial assert (SEL == 1 || SEL == 2) else $error("seed_out_map: SEL must be 1 or 2");

  always_comb begin
    y = CST;
    for (int j = 0; j < 8; j++)
      if (x[j]) y ^= COLS[j];
  end
endmodule
