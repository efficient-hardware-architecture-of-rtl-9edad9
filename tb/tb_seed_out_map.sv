// tb_seed_out_map: for every tower-field value v, the S1 output stage must give
// A1 * (delta^-1 v)^8 + 169 and the S2 stage A2 * (delta^-1 v)^4 + 56, with
// delta^-1 tabulated from the reference delta and powers computed in GF(2^8).
module tb_seed_out_map;
  import seed_ref_pkg::*;
  logic [7:0] v, y1, y2;
  logic [7:0] dinv [256];
  int checks = 0, failures = 0;
  seed_out_map #(.SEL(1)) u1 (.x(v), .y(y1));
  seed_out_map #(.SEL(2)) u2 (.x(v), .y(y2));
  initial begin
    for (int i = 0; i < 256; i++) dinv[delta(8'(i))] = 8'(i);
    for (int i = 0; i < 256; i++) begin
      v = 8'(i);
      #1;
      checks += 2;
      if (y1 !== (affine(A1_ROWS, ppow(dinv[i], 8)) ^ 8'd169)) begin failures++; $display("FAIL S1 v=%h", v); end
      if (y2 !== (affine(A2_ROWS, ppow(dinv[i], 4)) ^ 8'd56))  begin failures++; $display("FAIL S2 v=%h", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
