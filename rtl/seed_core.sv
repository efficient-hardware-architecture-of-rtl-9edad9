// seed_core: iterative SEED block cipher (128-bit block, 128-bit key,
// 16-round Feistel network) built around a single shared G-function whose
// S-boxes use composite-field arithmetic.
//
// Each round takes 7 cycles, one G evaluation in five of them:
//   PH_K0  G(A+C-KC) -> K0      PH_K1  G(B-D+KC) -> K1     PH_MIX key mixing
//   PH_G1, PH_G2, PH_G3  the three G layers of F
//   PH_OUT L/R update (no swap after round 16), key-state rotation.
// A block takes 1 load cycle + 16 x 7 = 113 cycles, i.e. 16.99 Mbit/s at
// 15 MHz. The shared G and the 7 cycles per round are the document's; the
// assignment of work to the seven cycles is this design's.
//
// Interface: a request (in_valid & in_ready) loads din, key and decrypt.
// din = {L0, R0}, big-endian as in the SEED standard. 112 cycles later
// out_valid pulses for one cycle with the result on dout; dout keeps it until
// the next request, which can be accepted in that same cycle. Decryption uses
// the same rounds with the round keys generated in reverse order.
// Reset is asynchronous and active low. rst_n also gates the handshake
// assertions at the end of the file, which is why lint reports it as used
// both asynchronously and synchronously; the logic itself uses it only as an
// asynchronous reset.
module seed_core
  import seed_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         decrypt,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         out_valid,
  output logic [127:0] dout
);
  logic        busy, dec_q;
  logic [3:0]  rnd;          // rounds done so far, 0..15
  phase_e      phase;
  logic [63:0] l_q, r_q;
  logic [4:0]  round_no;     // logical SEED round number 1..16
  logic        start, last_round;

  word_t       g_in, g_out, g_in_k0, g_in_k1, g_in_f, rk0, rk1;
  logic [63:0] f_out;

  assign in_ready   = ~busy;
  assign start      = in_valid & in_ready;
  assign round_no   = dec_q ? 5'(ROUNDS) - 5'(rnd) : 5'(rnd) + 5'd1;
  assign last_round = (rnd == 4'(ROUNDS - 1));
  assign dout       = {l_q, r_q};

  // One G-function shared by the key schedule and the round function.
  always_comb begin
    unique case (phase)
      PH_K0:   g_in = g_in_k0;
      PH_K1:   g_in = g_in_k1;
      default: g_in = g_in_f;
    endcase
  end

  seed_g u_g (.x(g_in), .y(g_out));

  seed_keysched u_ks (
    .clk, .rst_n,
    .load      (start),
    .decrypt,
    .key,
    .kc_idx    (4'(round_no - 5'd1)),
    .advance   (busy && phase == PH_OUT),
    .round_odd (round_no[0]),
    .g_in_k0, .g_in_k1,
    .g_out,
    .cap_k0    (busy && phase == PH_K0),
    .cap_k1    (busy && phase == PH_K1),
    .rk0, .rk1
  );

  seed_f_path u_f (
    .clk,
    .phase,
    .c     (r_q[63:32]),
    .d     (r_q[31:0]),
    .k0    (rk0),
    .k1    (rk1),
    .g_in  (g_in_f),
    .g_out,
    .f_out
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      dec_q     <= 1'b0;
      rnd       <= '0;
      phase     <= PH_K0;
      l_q       <= '0;
      r_q       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        dec_q <= decrypt;
        rnd   <= '0;
        phase <= PH_K0;
        l_q   <= din[127:64];
        r_q   <= din[63:0];
      end else if (busy) begin
        if (phase == PH_OUT) begin
          phase <= PH_K0;
          if (last_round) begin
            l_q       <= l_q ^ f_out;     // final round: no swap
            busy      <= 1'b0;
            out_valid <= 1'b1;
          end else begin
            l_q <= r_q;
            r_q <= l_q ^ f_out;
            rnd <= rnd + 4'd1;
          end
        end else begin
          phase <= phase_e'(phase + 3'd1);
        end
      end
    end
  end

  // Handshake rules: no result while busy, no request accepted while busy.
  a_out_idle:  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !busy);
  a_phase_ok:  assert property (@(posedge clk) disable iff (!rst_n) busy |-> int'(phase) < PHASES_PER_ROUND);
  a_no_accept: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !in_ready);
endmodule
