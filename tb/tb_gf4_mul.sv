// tb_gf4_mul: exhaustive check of the GF(2^2) multiplier (16 operand pairs)
// against schoolbook multiplication reduced by w^2 = w + 1.
module tb_gf4_mul;
  import seed_ref_pkg::*;
  logic [1:0] a, b, y;
  int checks = 0, failures = 0;
  gf4_mul dut (.a, .b, .y);
  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (y !== m4(a, b)) begin failures++; $display("FAIL %0d*%0d = %0d", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
