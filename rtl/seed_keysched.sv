// seed_keysched: on-the-fly SEED key schedule that borrows the core's shared
// G-function. The document leaves the key schedule out; this follows the
// SEED standard.
//
// Key state {A, B, C, D} (32-bit words, A = key[127:96]). For round i
// (KC = 0x9E3779B9 rotated left by i-1):
//   K0[i] = G(A + C - KC),  K1[i] = G(B - D + KC)
// and after an odd round A||B rotates right by 8 bits, after an even round
// C||D rotates left by 8 bits. Sixteen rounds rotate each half by 64 bits,
// so the state returns to the user key. Decryption walks the same sequence
// backwards: load undoes round 16's rotation, and after round i the inverse of
// round i-1's rotation is applied.
//
// Timing: g_in_k0/g_in_k1 depend only on the registered state and kc_idx; the
// core feeds one of them through G and raises cap_k0/cap_k1 in that cycle so
// the result lands in rk0/rk1 at the next edge. load and advance act at the
// clock edge; decrypt is sampled at load.
module seed_keysched
  import seed_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         decrypt,
  input  logic [127:0] key,
  input  logic [3:0]   kc_idx,      // round number minus one
  input  logic         advance,
  input  logic         round_odd,   // the round that is finishing is odd
  output word_t        g_in_k0,
  output word_t        g_in_k1,
  input  word_t        g_out,
  input  logic         cap_k0,
  input  logic         cap_k1,
  output word_t        rk0,
  output word_t        rk1
);
  logic [63:0] ab, cd;
  logic        dec_q;
  word_t       kc;

  always_comb begin
    kc      = rotl32(KC0, 32'(kc_idx));
    g_in_k0 = ab[63:32] + cd[63:32] - kc;
    g_in_k1 = ab[31:0]  - cd[31:0]  + kc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ab    <= '0;
      cd    <= '0;
      dec_q <= 1'b0;
      rk0   <= '0;
      rk1   <= '0;
    end else begin
      if (load) begin
        dec_q <= decrypt;
        ab    <= key[127:64];
        cd    <= decrypt ? {key[7:0], key[63:8]} : key[63:0];
      end else if (advance) begin
        unique case ({dec_q, round_odd})
          2'b01: ab <= {ab[7:0], ab[63:8]};     // encrypt, odd:  A||B >>> 8
          2'b00: cd <= {cd[55:0], cd[63:56]};   // encrypt, even: C||D <<< 8
          2'b10: ab <= {ab[55:0], ab[63:56]};   // decrypt, even: undo odd round i-1
          2'b11: cd <= {cd[7:0], cd[63:8]};     // decrypt, odd:  undo even round i-1
        endcase
      end
      if (cap_k0) rk0 <= g_out;
      if (cap_k1) rk1 <= g_out;
    end
  end
endmodule
