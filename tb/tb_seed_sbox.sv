// tb_seed_sbox: exhaustive check of both S-box instances against their
// defining equations (S1 = A1*x^247 + 169, S2 = A2*x^251 + 56, evaluated by
// repeated multiplication), plus the first eight entries of each published
// SEED S-box table.
module tb_seed_sbox;
  import seed_ref_pkg::*;
  logic [7:0] x, y1, y2;
  logic [7:0] s1_pub [8] = '{8'hA9, 8'h85, 8'hD6, 8'hD3, 8'h54, 8'h1D, 8'hAC, 8'h25};
  logic [7:0] s2_pub [8] = '{8'h38, 8'hE8, 8'h2D, 8'hA6, 8'hCF, 8'hDE, 8'hB3, 8'hB8};
  int checks = 0, failures = 0;
  seed_sbox #(.SEL(1)) u1 (.x, .y(y1));
  seed_sbox #(.SEL(2)) u2 (.x, .y(y2));
  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks += 2;
      if (y1 !== s1(x)) begin failures++; $display("FAIL S1(%h) = %h", x, y1); end
      if (y2 !== s2(x)) begin failures++; $display("FAIL S2(%h) = %h", x, y2); end
      if (i < 8) begin
        checks += 2;
        if (y1 !== s1_pub[i] || y2 !== s2_pub[i]) begin failures++; $display("FAIL table %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
