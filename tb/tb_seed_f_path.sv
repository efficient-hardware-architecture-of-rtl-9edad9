// tb_seed_f_path: steps the F datapath through PH_MIX .. PH_OUT with G
// evaluated by the reference model, and compares f_out with the reference
// round function for random halves and round keys.
module tb_seed_f_path;
  import seed_pkg::*;
  import seed_ref_pkg::*;
  logic clk = 0;
  phase_e phase = PH_K0;
  logic [31:0] c, d, k0, k1, g_in, g_out;
  logic [63:0] f_out;
  int checks = 0, failures = 0;

  seed_f_path dut (.*);
  always #5 clk = ~clk;
  always_comb g_out = g(g_in);

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {c, d, k0, k1} = {$urandom, $urandom, $urandom, $urandom};
      if (i == 0) {c, d, k0, k1} = '0;
      phase = PH_MIX; @(negedge clk);
      phase = PH_G1;  @(negedge clk);
      phase = PH_G2;  @(negedge clk);
      phase = PH_G3;  @(negedge clk);
      phase = PH_OUT; #1;
      checks++;
      if (f_out !== f({c, d}, {k0, k1})) begin
        failures++; if (failures < 10) $display("FAIL F(%h,%h) = %h", {c, d}, {k0, k1}, f_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
