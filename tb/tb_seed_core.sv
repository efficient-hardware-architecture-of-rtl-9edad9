// tb_seed_core: end-to-end test of the SEED core at its default (and only)
// configuration.
//  * The four published SEED test vectors, encrypted and decrypted.
//  * Random key/block pairs: encryption against the reference model, then
//    decryption of the result back to the plaintext.
//  * Timing: out_valid must come exactly 112 cycles after the accepting
//    edge, and back-to-back requests must be accepted every 113 cycles
//    (1 load + 16 rounds x 7 cycles).
//  * Mechanisms counted, each must occur: encryption, decryption, a request
//    accepted in the same cycle as the previous result (back-to-back), a
//    request held while the core is busy (must be ignored), a switch between
//    encryption and decryption on consecutive blocks.
module tb_seed_core;
  import seed_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, decrypt = 0, out_valid;
  logic [127:0] key = '0, din = '0, dout;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_b2b = 0, n_busy_hold = 0, n_switch = 0;
  longint cyc = 0, t_accept = 0, t_prev_accept = -1;
  logic last_dec = 0;

  seed_core dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Record every accepted request.
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    if (t_prev_accept >= 0 && cyc - t_prev_accept == 113) n_b2b++;
    if (t_prev_accept >= 0 && decrypt != last_dec) n_switch++;
    t_prev_accept <= cyc;
    t_accept      <= cyc;
    last_dec      <= decrypt;
  end
  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_busy_hold++;

  // Issue one request and wait for its result. If hold_busy, in_valid stays
  // high (with garbage data) for a while after acceptance.
  task automatic op(input logic [127:0] k, input logic [127:0] blk, input logic dec,
                    input logic [127:0] expect_out, input bit hold_busy, output logic [127:0] res);
    @(negedge clk);
    in_valid = 1; key = k; din = blk; decrypt = dec;
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk);
    if (hold_busy) begin
      key = ~k; din = ~blk; decrypt = ~dec;
      repeat (20) @(negedge clk);
    end
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    res = dout;
    // cyc has already counted the edge that raised out_valid.
    checks++;
    if (cyc - 1 - t_accept != 112) begin
      failures++; $display("FAIL latency %0d", cyc - 1 - t_accept);
    end
    checks++;
    if (dout !== expect_out) begin
      failures++; $display("FAIL dec=%0d key=%h in=%h out=%h exp=%h", dec, k, blk, dout, expect_out);
    end
    if (dec) n_dec++; else n_enc++;
  endtask

  logic [127:0] k [4], p [4], c [4], r, kk, pp;

  initial begin
    k[0] = '0;                                        p[0] = 128'h000102030405060708090A0B0C0D0E0F;
    c[0] = 128'h5EBAC6E0054E166819AFF1CC6D346CDB;
    k[1] = 128'h000102030405060708090A0B0C0D0E0F;     p[1] = '0;
    c[1] = 128'hC11F22F20140505084483597E4370F43;
    k[2] = 128'h4706480851E61BE85D74BFB3FD956185;     p[2] = 128'h83A2F8A288641FB9A4E9A5CC2F131C7D;
    c[2] = 128'hEE54D13EBCAE706D226BC3142CD40D4A;
    k[3] = 128'h28DBC3BC49FFD87DCFA509B11D422BE7;     p[3] = 128'hB41E6BE2EBA84A148E2EED84593C5EC7;
    c[3] = 128'h9B9B7BFCD1813CB95D0B3618F40F5122;

    repeat (3) @(negedge clk); rst_n = 1;

    for (int i = 0; i < 4; i++) begin
      op(k[i], p[i], 1'b0, c[i], i == 1, r);
      op(k[i], c[i], 1'b1, p[i], 1'b0, r);
    end

    // Back-to-back stream: keep in_valid high so each request is accepted in
    // the cycle its predecessor's result appears.
    begin
      logic [127:0] bk [6], bp [6];
      logic         bd [6];
      int           got = 0;
      for (int i = 0; i < 6; i++) begin
        bk[i] = {$urandom, $urandom, $urandom, $urandom};
        bp[i] = {$urandom, $urandom, $urandom, $urandom};
        bd[i] = i[0];
      end
      @(negedge clk);
      in_valid = 1; key = bk[0]; din = bp[0]; decrypt = bd[0];
      while (got < 6) begin
        @(posedge clk); #1;
        if (out_valid) begin
          checks++;
          if (dout !== cipher(bk[got], bp[got], bd[got])) begin
            failures++; $display("FAIL stream %0d", got);
          end
          if (bd[got]) n_dec++; else n_enc++;
          got++;
        end
        // After an acceptance present the next request.
        if (!in_ready && got + 1 < 6 && din === bp[got]) begin
          key = bk[got + 1]; din = bp[got + 1]; decrypt = bd[got + 1];
        end
        if (got == 5 && !in_ready && din === bp[5]) in_valid = 0;
      end
      in_valid = 0;
    end

    // Random round trips.
    for (int i = 0; i < 20; i++) begin
      kk = {$urandom, $urandom, $urandom, $urandom};
      pp = {$urandom, $urandom, $urandom, $urandom};
      op(kk, pp, 1'b0, cipher(kk, pp, 1'b0), 1'b0, r);
      op(kk, r, 1'b1, pp, 1'b0, r);
    end

    checks += 5;
    if (n_enc == 0)       begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)       begin failures++; $display("FAIL no decryption"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back request"); end
    if (n_busy_hold == 0) begin failures++; $display("FAIL no request held while busy"); end
    if (n_switch == 0)    begin failures++; $display("FAIL no encrypt/decrypt switch"); end
    $display("mechanisms: encrypt=%0d decrypt=%0d back_to_back=%0d held_while_busy=%0d mode_switch=%0d",
             n_enc, n_dec, n_b2b, n_busy_hold, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
