// seed_ref_pkg: reference models for the SEED testbenches, written
// independently of the RTL: GF(2^8) arithmetic by shift-and-reduce, S-boxes
// straight from their defining equations S1 = A1*x^247 + 169 and
// S2 = A2*x^251 + 56 (exponentiation, no inversion shortcut), tower-field
// arithmetic by schoolbook multiplication, and the whole cipher (G-function,
// key schedule, 16 Feistel rounds) as plain functions.
package seed_ref_pkg;

  // ---- GF(2^8) mod x^8+x^6+x^5+x+1 ----
  function automatic logic [7:0] pmul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h163 << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ppow(input logic [7:0] x, input int e);
    logic [7:0] r = 8'd1;
    for (int i = 0; i < e; i++) r = pmul(r, x);
    return r;
  endfunction

  // Matrix rows as printed: row i -> output bit 7-i, column j -> input bit 7-j.
  function automatic logic [7:0] affine(input logic [63:0] rows, input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[7-i] = ^(rows[63-8*i -: 8] & x);
    return y;
  endfunction

  localparam logic [63:0] A1_ROWS = {8'b10001010, 8'b11111110, 8'b10000101, 8'b01000010,
                                     8'b01000101, 8'b00100001, 8'b10001000, 8'b00010100};
  localparam logic [63:0] A2_ROWS = {8'b01000101, 8'b10000101, 8'b11111110, 8'b00100001,
                                     8'b10001010, 8'b10001000, 8'b01000010, 8'b00010100};

  function automatic logic [7:0] s1(input logic [7:0] x);
    return affine(A1_ROWS, ppow(x, 247)) ^ 8'd169;
  endfunction
  function automatic logic [7:0] s2(input logic [7:0] x);
    return affine(A2_ROWS, ppow(x, 251)) ^ 8'd56;
  endfunction

  // ---- tower field ----
  // GF(2^2): w^2 = w + 1
  function automatic logic [1:0] m4(input logic [1:0] a, input logic [1:0] b);
    logic [2:0] p = '0;
    for (int i = 0; i < 2; i++) if (b[i]) p ^= 3'(a) << i;
    if (p[2]) p ^= 3'b111;
    return p[1:0];
  endfunction
  // GF((2^2)^2): z^2 = z + {10}
  function automatic logic [3:0] m16(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] c2, c1, c0;
    c2 = m4(a[3:2], b[3:2]);
    c1 = m4(a[3:2], b[1:0]) ^ m4(a[1:0], b[3:2]);
    c0 = m4(a[1:0], b[1:0]);
    return {c1 ^ c2, c0 ^ m4(c2, 2'b10)};
  endfunction
  // GF(((2^2)^2)^2): y^2 = y + {1100}
  function automatic logic [7:0] m256(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] c2, c1, c0;
    c2 = m16(a[7:4], b[7:4]);
    c1 = m16(a[7:4], b[3:0]) ^ m16(a[3:0], b[7:4]);
    c0 = m16(a[3:0], b[3:0]);
    return {c1 ^ c2, c0 ^ m16(c2, 4'b1100)};
  endfunction

  // DELTA as printed, row i -> output bit i, column j -> input bit j.
  localparam logic [63:0] DELTA_ROWS = {8'b10000100, 8'b01000001, 8'b01011111, 8'b01010110,
                                        8'b00100011, 8'b01101001, 8'b00000110, 8'b00010110};
  function automatic logic [7:0] delta(input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) begin
      y[i] = 1'b0;
      for (int j = 0; j < 8; j++) y[i] ^= DELTA_ROWS[63-8*i-j] & x[j];
    end
    return y;
  endfunction

  // ---- cipher ----
  function automatic logic [31:0] g(input logic [31:0] x);
    logic [7:0] a, b, c, d;
    logic [31:0] y;
    a = s1(x[7:0]); b = s2(x[15:8]); c = s1(x[23:16]); d = s2(x[31:24]);
    y[7:0]   = (a & 8'hFC) ^ (b & 8'hF3) ^ (c & 8'hCF) ^ (d & 8'h3F);
    y[15:8]  = (a & 8'hF3) ^ (b & 8'hCF) ^ (c & 8'h3F) ^ (d & 8'hFC);
    y[23:16] = (a & 8'hCF) ^ (b & 8'h3F) ^ (c & 8'hFC) ^ (d & 8'hF3);
    y[31:24] = (a & 8'h3F) ^ (b & 8'hFC) ^ (c & 8'hF3) ^ (d & 8'hCF);
    return y;
  endfunction

  function automatic logic [63:0] f(input logic [63:0] r, input logic [63:0] k);
    logic [31:0] t0, t1;
    t0 = r[63:32] ^ k[63:32];
    t1 = r[31:0] ^ k[31:0] ^ t0;
    t1 = g(t1);
    t0 = g(t0 + t1);
    t1 = g(t1 + t0);
    t0 = t0 + t1;
    return {t0, t1};
  endfunction

  // Round keys K[1..16] = {K0, K1}; index 0 unused.
  typedef logic [63:0] rk_t [17];
  function automatic rk_t round_keys(input logic [127:0] key);
    rk_t rk;
    logic [63:0] ab = key[127:64], cd = key[63:0];
    logic [31:0] kc = 32'h9E3779B9;
    rk[0] = '0;
    for (int i = 1; i <= 16; i++) begin
      rk[i] = {g(ab[63:32] + cd[63:32] - kc), g(ab[31:0] - cd[31:0] + kc)};
      if (i % 2 == 1) ab = {ab[7:0], ab[63:8]};
      else            cd = {cd[55:0], cd[63:56]};
      kc = {kc[30:0], kc[31]};
    end
    return rk;
  endfunction

  function automatic logic [127:0] cipher(input logic [127:0] key, input logic [127:0] blk,
                                          input logic dec);
    rk_t rk = round_keys(key);
    logic [63:0] l = blk[127:64], r = blk[63:0], t;
    for (int i = 1; i <= 16; i++) begin
      t = l ^ f(r, rk[dec ? 17 - i : i]);
      if (i < 16) begin l = r; r = t; end
      else l = t;
    end
    return {l, r};
  endfunction

endpackage
