// tb_seed_g: the G-function against the reference model: all single-byte
// inputs in each byte lane, then 3000 random words.
module tb_seed_g;
  import seed_ref_pkg::*;
  logic [31:0] x, y;
  int checks = 0, failures = 0;
  seed_g dut (.x, .y);
  task automatic check(input logic [31:0] v);
    x = v;
    #1;
    checks++;
    if (y !== g(v)) begin failures++; if (failures < 10) $display("FAIL G(%h) = %h exp %h", v, y, g(v)); end
  endtask
  initial begin
    for (int lane = 0; lane < 4; lane++)
      for (int i = 0; i < 256; i++) check(32'(i) << (8 * lane));
    for (int i = 0; i < 3000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
