// gf4_mul: multiplier in GF(2^2) with field polynomial w^2 + w + 1.
// Operands are {bit1, bit0} = bit1*w + bit0. Four AND terms and XORs, as in the
// document's GF(2^2) multiplier:
//   y[1] = a1b1 ^ a1b0 ^ a0b1,   y[0] = a1b1 ^ a0b0.
// Purely combinational.
module gf4_mul
  import seed_pkg::*;
(
  input  gf4_t a,
  input  gf4_t b,
  output gf4_t y
);
  logic hh, hl, lh, ll;

  always_comb begin
    hh = a[1] & b[1];
    hl = a[1] & b[0];
    lh = a[0] & b[1];
    ll = a[0] & b[0];
    y  = {hh ^ hl ^ lh, hh ^ ll};
  end
endmodule
