// tb_gf256_inv: every nonzero x must give x * y = 1 in GF(((2^2)^2)^2)
// (schoolbook multiplication with y^2 = y + {1100}); 0 must give 0.
module tb_gf256_inv;
  import seed_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  gf256_inv dut (.x, .y);
  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if ((i == 0) ? (y !== 8'h00) : (m256(x, y) !== 8'h01)) begin
        failures++; $display("FAIL inv(%h) = %h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
