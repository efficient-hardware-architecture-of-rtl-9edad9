// gf16_mul: multiplier in GF((2^2)^2) with field polynomial z^2 + z + PHI,
// PHI = {10} (= w in GF(2^2)). An operand is {high, low} = high*z + low with
// 2-bit GF(2^2) halves. Karatsuba form with three GF(2^2) multipliers, as in
// the document's figure:
//   y_high = (ah^al)(bh^bl) ^ al*bl,   y_low = PHI*(ah*bh) ^ al*bl.
// Multiplying by PHI is {x1^x0, x1}. Purely combinational.
module gf16_mul
  import seed_pkg::*;
(
  input  gf16_t a,
  input  gf16_t b,
  output gf16_t y
);
  gf4_t hh, mm, ll, hh_phi;

  gf4_mul u_hh (.a(a[3:2]),        .b(b[3:2]),        .y(hh));
  gf4_mul u_mm (.a(a[3:2] ^ a[1:0]), .b(b[3:2] ^ b[1:0]), .y(mm));
  gf4_mul u_ll (.a(a[1:0]),        .b(b[1:0]),        .y(ll));

  always_comb begin
    hh_phi = {hh[1] ^ hh[0], hh[1]};
    y      = {mm ^ ll, hh_phi ^ ll};
  end
endmodule
