// gf256_inv: inverse in the tower field GF(((2^2)^2)^2), field polynomial
// y^2 + y + LAMBDA over GF((2^2)^2), LAMBDA = {1100}. An element is
// {xh, xl} = xh*y + xl (4-bit halves); 0 maps to 0.
//
//   d      = LAMBDA*xh^2 ^ (xh ^ xl)*xl      (one GF((2^2)^2) multiplier)
//   x^-1   = { xh*d^-1, (xh ^ xl)*d^-1 }     (two more multipliers)
//
// Squaring and scaling by LAMBDA are fixed XOR networks (derived from the
// field polynomials):
//   xh^2      = {x3, x3^x2, x2^x1, x3^x1^x0}
//   LAMBDA*a  = {s0, s1^s0, a3, a2} with s = a[3:2] ^ a[1:0]
// This is the structure of the document's inversion circuit: square, scale by
// lambda, one multiplier, XOR, a GF((2^2)^2) inverter and two output
// multipliers. Purely combinational.
module gf256_inv
  import seed_pkg::*;
(
  input  gf256_t x,
  output gf256_t y
);
  gf16_t xh, xl, xs, sq, sq_lam, prod, d, d_inv, yh, yl;
  gf4_t  s;

  always_comb begin
    xh     = x[7:4];
    xl     = x[3:0];
    xs     = xh ^ xl;
    sq     = {xh[3], xh[3] ^ xh[2], xh[2] ^ xh[1], xh[3] ^ xh[1] ^ xh[0]};
    s      = sq[3:2] ^ sq[1:0];
    sq_lam = {s[0], s[1] ^ s[0], sq[3:2]};
    d      = sq_lam ^ prod;
  end

  gf16_mul u_mul_d  (.a(xs), .b(xl),    .y(prod));
  gf16_inv u_inv    (.x(d),  .y(d_inv));
  gf16_mul u_mul_hi (.a(xh), .b(d_inv), .y(yh));
  gf16_mul u_mul_lo (.a(xs), .b(d_inv), .y(yl));

  assign y = {yh, yl};
endmodule
