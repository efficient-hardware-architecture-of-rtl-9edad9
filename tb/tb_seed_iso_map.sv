// tb_seed_iso_map: DELTA must be a field isomorphism. For all a, b:
// delta(a*b) = delta(a) * delta(b) (products in the two fields, computed by
// the reference model), delta(1) = 1, and delta must be one-to-one.
module tb_seed_iso_map;
  import seed_ref_pkg::*;
  logic [7:0] xa, xb, xp, ya, yb, yp;
  logic [255:0] seen;
  int checks = 0, failures = 0;
  seed_iso_map u_a (.x(xa), .y(ya));
  seed_iso_map u_b (.x(xb), .y(yb));
  seed_iso_map u_p (.x(xp), .y(yp));
  initial begin
    seen = '0;
    for (int i = 0; i < 256; i++) begin
      xa = 8'(i); xb = 8'd1; xp = 8'd1;
      #1;
      seen[ya] = 1'b1;
      checks++;
      if (yb !== 8'd1) begin failures++; $display("FAIL delta(1) = %h", yb); end
      for (int j = 0; j < 256; j++) begin
        xb = 8'(j); xp = pmul(8'(i), 8'(j));
        #1;
        checks++;
        if (yp !== m256(ya, yb)) begin failures++; if (failures < 10) $display("FAIL a=%h b=%h", xa, xb); end
      end
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL not one-to-one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
