// tb_symbol_llr_gen -- symbol LLR vectors from random bit LLRs, against the sum of the
// magnitudes of the bits that disagree with the bit decisions, saturated at 31.
module tb_symbol_llr_gen;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic [3:0][W_CH-1:0] bit_llr;
  vec_t                 sym_llr;
  int                   checks = 0, failures = 0, n_sat = 0;

  symbol_llr_gen dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int v [4];
      vec_i e, g;
      for (int k = 0; k < 4; k++) begin
        v[k] = int'($urandom_range(31)) - 16;
        bit_llr[k] = W_CH'(v[k]);
      end
      for (int a = 0; a < 16; a++) begin
        automatic int s = 0;
        for (int k = 0; k < 4; k++) begin
          automatic int hd = (v[k] < 0) ? 1 : 0;
          if (((a >> k) & 1) != hd) s += (v[k] < 0) ? -v[k] : v[k];
        end
        if (s > 31) n_sat++;
        e[a] = sat(s);
      end
      #1;
      g = from_hw(sym_llr);
      for (int a = 0; a < 16; a++) begin
        checks++;
        if (g[a] != e[a]) begin
          failures++;
          if (failures < 10) $display("sym %0d got %0d exp %0d", a, g[a], e[a]);
        end
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
