// tb_ref_selftest: checks the reference model against published SEED test
// vectors before any RTL is trusted against it.
module tb_ref_selftest;
  import seed_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] k [4], p [4], c [4];
  initial begin
    k[0] = '0;                                        p[0] = 128'h000102030405060708090A0B0C0D0E0F;
    c[0] = 128'h5EBAC6E0054E166819AFF1CC6D346CDB;
    k[1] = 128'h000102030405060708090A0B0C0D0E0F;     p[1] = '0;
    c[1] = 128'hC11F22F20140505084483597E4370F43;
    k[2] = 128'h4706480851E61BE85D74BFB3FD956185;     p[2] = 128'h83A2F8A288641FB9A4E9A5CC2F131C7D;
    c[2] = 128'hEE54D13EBCAE706D226BC3142CD40D4A;
    k[3] = 128'h28DBC3BC49FFD87DCFA509B11D422BE7;     p[3] = 128'hB41E6BE2EBA84A148E2EED84593C5EC7;
    c[3] = 128'h9B9B7BFCD1813CB95D0B3618F40F5122;
    for (int i = 0; i < 4; i++) begin
      logic [127:0] e, d;
      e = cipher(k[i], p[i], 1'b0);
      d = cipher(k[i], c[i], 1'b1);
      checks += 2;
      if (e !== c[i]) begin failures++; $display("enc %0d got %h", i, e); end
      if (d !== p[i]) begin failures++; $display("dec %0d got %h", i, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
