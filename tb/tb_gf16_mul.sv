// tb_gf16_mul: exhaustive check of the GF((2^2)^2) multiplier (256 pairs)
// against schoolbook multiplication with z^2 = z + {10}.
module tb_gf16_mul;
  import seed_ref_pkg::*;
  logic [3:0] a, b, y;
  int checks = 0, failures = 0;
  gf16_mul dut (.a, .b, .y);
  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (y !== m16(a, b)) begin failures++; $display("FAIL %h*%h = %h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
