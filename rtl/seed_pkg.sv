// seed_pkg: types, constants and elaboration-time helpers shared by the SEED core.
//
// SEED S-boxes are S1(x) = A1 * x^247 + 169 and S2(x) = A2 * x^251 + 56 over
// GF(2^8) mod p(x) = x^8+x^6+x^5+x+1. Because x^247 = (x^-1)^8 and
// x^251 = (x^-1)^4, each S-box is an inversion followed by a linear map. The
// inversion is done in the tower field GF(((2^2)^2)^2) reached through the
// isomorphism DELTA; the way back (DELTA^-1, squarings, affine matrix) is
// folded into a single matrix that out_matrix() builds at elaboration time.
//
// Matrix conventions. A1/A2 rows are written as printed: row i gives output
// bit 7-i and the leftmost column multiplies input bit 7. DELTA rows are also
// written as printed, but DELTA is given in the opposite order: row i gives
// output bit i and the leftmost column multiplies input bit 0. Both readings
// were confirmed (A1/A2 against the published S-box values, DELTA by being a
// field isomorphism). The G-function permutation masks and the key-schedule
// constant come from the SEED standard.
package seed_pkg;

  typedef logic [1:0]  gf4_t;
  typedef logic [3:0]  gf16_t;
  typedef logic [7:0]  gf256_t;
  typedef logic [31:0] word_t;
  typedef logic [7:0]  mat8_t [8];   // eight 8-bit rows or columns

  // Phases of one round in the shared-G schedule (7 cycles per round).
  typedef enum logic [2:0] {
    PH_K0  = 3'd0,   // G(A + C - KC)        -> K0
    PH_K1  = 3'd1,   // G(B - D + KC)        -> K1
    PH_MIX = 3'd2,   // T0 = C^K0, T1 = D^K1^T0
    PH_G1  = 3'd3,   // T1 = G(T1)
    PH_G2  = 3'd4,   // T0 = G(T0 + T1)
    PH_G3  = 3'd5,   // T1 = G(T1 + T0)
    PH_OUT = 3'd6    // F = {T0 + T1, T1}; Feistel update; key rotation
  } phase_e;

  localparam int unsigned ROUNDS           = 16;
  localparam int unsigned PHASES_PER_ROUND = 7;

  localparam gf256_t P_POLY_LOW = 8'h63;   // x^6+x^5+x+1 (x^8 implied)

  localparam mat8_t A1 = '{8'b10001010, 8'b11111110, 8'b10000101, 8'b01000010,
                           8'b01000101, 8'b00100001, 8'b10001000, 8'b00010100};
  localparam mat8_t A2 = '{8'b01000101, 8'b10000101, 8'b11111110, 8'b00100001,
                           8'b10001010, 8'b10001000, 8'b01000010, 8'b00010100};
  localparam gf256_t C1 = 8'd169;
  localparam gf256_t C2 = 8'd56;

  localparam mat8_t DELTA = '{8'b10000100, 8'b01000001, 8'b01011111, 8'b01010110,
                              8'b00100011, 8'b01101001, 8'b00000110, 8'b00010110};

  // G-function permutation masks and key-schedule constant (SEED standard).
  localparam gf256_t M0 = 8'hFC, M1 = 8'hF3, M2 = 8'hCF, M3 = 8'h3F;
  localparam word_t  KC0 = 32'h9E3779B9;

  // y[7-i] = parity(m[i] & x): A1/A2 convention.
  function automatic gf256_t mat_msb(input mat8_t m, input gf256_t x);
    gf256_t y;
    for (int i = 0; i < 8; i++) y[7-i] = ^(m[i] & x);
    return y;
  endfunction

  // DELTA convention: y[i] = sum_j m[i][7-j] * x[j].
  function automatic gf256_t mat_lsb(input mat8_t m, input gf256_t x);
    gf256_t y;
    for (int i = 0; i < 8; i++) begin
      y[i] = 1'b0;
      for (int j = 0; j < 8; j++) y[i] ^= m[i][7-j] & x[j];
    end
    return y;
  endfunction

  // Multiplication in GF(2^8) mod p(x), used only at elaboration.
  function automatic gf256_t gf256_pmul(input gf256_t a, input gf256_t b);
    gf256_t r  = '0;
    gf256_t aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= aa;
      aa = aa[7] ? ((aa << 1) ^ P_POLY_LOW) : (aa << 1);
    end
    return r;
  endfunction

  // Columns of the merged output matrix for S-box sel (1 or 2):
  // column j = A * (DELTA^-1 e_j)^(2^k), k = 3 for S1, 2 for S2.
  function automatic mat8_t out_matrix(input int sel);
    mat8_t  col;
    gf256_t v;
    for (int j = 0; j < 8; j++) begin
      v = '0;
      for (int x = 0; x < 256; x++)
        if (mat_lsb(DELTA, gf256_t'(x)) == gf256_t'(1 << j)) v = gf256_t'(x);
      for (int k = 0; k < ((sel == 1) ? 3 : 2); k++) v = gf256_pmul(v, v);
      col[j] = (sel == 1) ? mat_msb(A1, v) : mat_msb(A2, v);
    end
    return col;
  endfunction

  function automatic word_t rotl32(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

endpackage
