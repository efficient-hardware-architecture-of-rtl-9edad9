// seed_f_path: datapath of the SEED round function F for a core with one
// shared G-function. F maps the right half {C, D} and the round key
// {K0, K1} to {C', D'}:
//   T0 = C ^ K0;  T1 = D ^ K1 ^ T0
//   T1 = G(T1);   T0 = G(T0 + T1);   T1 = G(T1 + T0);   C' = T0 + T1;  D' = T1
// (additions modulo 2^32). The dataflow is the document's; spreading it over
// the phases PH_MIX, PH_G1, PH_G2, PH_G3 and PH_OUT, one G per cycle, is this
// design's schedule. g_in is the operand this block wants G to evaluate in
// the current phase; g_out is G's result in the same cycle. f_out is valid
// during PH_OUT. The temporaries need no reset: PH_MIX writes both before
// any read.
module seed_f_path
  import seed_pkg::*;
(
  input  logic   clk,
  input  phase_e phase,
  input  word_t  c,
  input  word_t  d,
  input  word_t  k0,
  input  word_t  k1,
  output word_t  g_in,
  input  word_t  g_out,
  output logic [63:0] f_out
);
  word_t t0, t1;

  always_comb begin
    unique case (phase)
      PH_G2:   g_in = t0 + t1;
      PH_G3:   g_in = t1 + t0;
      default: g_in = t1;
    endcase
    f_out = {t0 + t1, t1};
  end

  always_ff @(posedge clk) begin
    unique case (phase)
      PH_MIX: begin
        t0 <= c ^ k0;
        t1 <= d ^ k1 ^ c ^ k0;
      end
      PH_G1:   t1 <= g_out;
      PH_G2:   t0 <= g_out;
      PH_G3:   t1 <= g_out;
      default: ;
    endcase
  end
endmodule
