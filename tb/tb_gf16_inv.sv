// tb_gf16_inv: every nonzero x must give x * y = 1 in GF((2^2)^2), and 0 must
// give 0.
module tb_gf16_inv;
  import seed_ref_pkg::*;
  logic [3:0] x, y;
  int checks = 0, failures = 0;
  gf16_inv dut (.x, .y);
  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if ((i == 0) ? (y !== 4'h0) : (m16(x, y) !== 4'h1)) begin
        failures++; $display("FAIL inv(%h) = %h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
