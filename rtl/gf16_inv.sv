// gf16_inv: inverse in GF((2^2)^2) (z^2 + z + {10} over GF(2^2), w^2 + w + 1),
// realised as a 16-entry lookup table; 0 maps to 0. The document allows either
// a table or a further split into GF(2^2) operations; the table is this
// design's choice. Entries satisfy gf16_mul(x, y) = 1 for every x != 0.
// Purely combinational.
module gf16_inv
  import seed_pkg::*;
(
  input  gf16_t x,
  output gf16_t y
);
  always_comb begin
    unique case (x)
      4'h0: y = 4'h0;  4'h1: y = 4'h1;  4'h2: y = 4'h3;  4'h3: y = 4'h2;
      4'h4: y = 4'hF;  4'h5: y = 4'hC;  4'h6: y = 4'h9;  4'h7: y = 4'hB;
      4'h8: y = 4'hA;  4'h9: y = 4'h6;  4'hA: y = 4'h8;  4'hB: y = 4'h7;
      4'hC: y = 4'h5;  4'hD: y = 4'hE;  4'hE: y = 4'hD;  default: y = 4'h4;
    endcase
  end
endmodule
