// seed_iso_map: isomorphism DELTA from GF(2^8) (polynomial basis,
// p(x) = x^8+x^6+x^5+x+1) to the tower field GF(((2^2)^2)^2) used by
// gf256_inv. DELTA is the document's 8x8 GF(2) matrix; it is applied as
// y[i] = XOR over j of DELTA[i][j] & x[j], with row 0 and column 0 belonging
// to bit 0. Pure XOR network, combinational.
module seed_iso_map
  import seed_pkg::*;
(
  input  gf256_t x,
  output gf256_t y
);
  assign y = mat_lsb(DELTA, x);
endmodule
