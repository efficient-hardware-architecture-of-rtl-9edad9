// seed_sbox: SEED S-box S1 (SEL = 1) or S2 (SEL = 2) in composite-field form.
// Three stages, all combinational:
//   1. seed_iso_map  - DELTA, GF(2^8) -> GF(((2^2)^2)^2)
//   2. gf256_inv     - inversion in the tower field
//   3. seed_out_map  - merged DELTA^-1, squaring (x8 for S1, x4 for S2) and
//                      affine matrix, plus 169 (S1) or 56 (S2)
// This replaces a 256-entry table for x^247 / x^251 with an inverter; the
// structure is the document's, the module boundaries are this design's.
module seed_sbox
  import seed_pkg::*;
#(
  parameter int SEL = 1
) (
  input  gf256_t x,
  output gf256_t y
);
  gf256_t xc, xc_inv;

  seed_iso_map             u_iso (.x(x),      .y(xc));
  gf256_inv                u_inv (.x(xc),     .y(xc_inv));
  seed_out_map #(.SEL(SEL)) u_out (.x(xc_inv), .y(y));
endmodule
