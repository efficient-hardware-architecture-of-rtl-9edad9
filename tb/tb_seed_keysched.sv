// tb_seed_keysched: drives the key schedule as the core does (7-cycle rounds,
// G evaluated by the reference model) and compares every round key with the
// reference schedule, in encryption order and in decryption order, for the
// published test keys and random keys.
module tb_seed_keysched;
  import seed_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, decrypt = 0, advance = 0, round_odd = 0;
  logic cap_k0 = 0, cap_k1 = 0;
  logic [127:0] key = '0;
  logic [3:0] kc_idx = '0;
  logic [31:0] g_in_k0, g_in_k1, g_out, rk0, rk1;
  int checks = 0, failures = 0;

  seed_keysched dut (.*);
  always #5 clk = ~clk;

  always_comb g_out = cap_k0 ? g(g_in_k0) : g(g_in_k1);

  task automatic run(input logic [127:0] k, input logic dec);
    rk_t exp = round_keys(k);
    int  r;
    @(negedge clk); load = 1; decrypt = dec; key = k;
    @(negedge clk); load = 0;
    for (int step = 0; step < 16; step++) begin
      r = dec ? 16 - step : step + 1;
      kc_idx = 4'(r - 1);
      cap_k0 = 1; @(negedge clk); cap_k0 = 0;
      cap_k1 = 1; @(negedge clk); cap_k1 = 0;
      checks++;
      if ({rk0, rk1} !== exp[r]) begin
        failures++; $display("FAIL key %h dec=%0d round %0d: %h exp %h", k, dec, r, {rk0, rk1}, exp[r]);
      end
      repeat (4) @(negedge clk);
      advance = 1; round_odd = r[0]; @(negedge clk); advance = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int dec = 0; dec < 2; dec++) begin
      run(128'h0, dec[0]);
      run(128'h000102030405060708090A0B0C0D0E0F, dec[0]);
      run(128'h4706480851E61BE85D74BFB3FD956185, dec[0]);
      for (int i = 0; i < 4; i++) run({$urandom, $urandom, $urandom, $urandom}, dec[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
