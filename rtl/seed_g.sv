// seed_g: the SEED G-function on a 32-bit word x = {d, c, b, a} (a = x[7:0]).
// S-box layer: a and c go through S1, b and d through S2. Permutation layer
// (from the SEED standard; the document only names it): each output byte
// takes 2-bit groups from all four S-box outputs through the masks
// M0=FC, M1=F3, M2=CF, M3=3F:
//   y0 = a&M0 ^ b&M1 ^ c&M2 ^ d&M3     y1 = a&M1 ^ b&M2 ^ c&M3 ^ d&M0
//   y2 = a&M2 ^ b&M3 ^ c&M0 ^ d&M1     y3 = a&M3 ^ b&M0 ^ c&M1 ^ d&M2
// where a..d are the S-box outputs. Purely combinational; the core shares one
// instance over all G evaluations of a round.
module seed_g
  import seed_pkg::*;
(
  input  word_t x,
  output word_t y
);
  gf256_t sa, sb, sc, sd;

  seed_sbox #(.SEL(1)) u_sa (.x(x[7:0]),   .y(sa));
  seed_sbox #(.SEL(2)) u_sb (.x(x[15:8]),  .y(sb));
  seed_sbox #(.SEL(1)) u_sc (.x(x[23:16]), .y(sc));
  seed_sbox #(.SEL(2)) u_sd (.x(x[31:24]), .y(sd));

  always_comb begin
    y[7:0]   = (sa & M0) ^ (sb & M1) ^ (sc & M2) ^ (sd & M3);
    y[15:8]  = (sa & M1) ^ (sb & M2) ^ (sc & M3) ^ (sd & M0);
    y[23:16] = (sa & M2) ^ (sb & M3) ^ (sc & M0) ^ (sd & M1);
    y[31:24] = (sa & M3) ^ (sb & M0) ^ (sc & M1) ^ (sd & M2);
  end
endmodule
