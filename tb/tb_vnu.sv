// tb_vnu -- checks the three-cycle variable node sequence (two Q messages, then the
// a posteriori sum and hard decision) against a saturating reference, with random and with
// large inputs so that the 5-bit saturation is exercised, plus the first-pass mode (R = 0).
module tb_vnu;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic       clk = 0, rst_n = 0;
  vec_t       r_in = '0, l_in = '0, q_out;
  logic       a_zero = 0, b_reg = 0, store = 0;
  logic [3:0] hd_idx;
  int         checks = 0, failures = 0, n_sat = 0;

  vnu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_i norm(vec_i s);
    int mn = 1 << 30;
    vec_i o;
    foreach (s[i]) if (s[i] < mn) mn = s[i];
    foreach (s[i]) o[i] = s[i] - mn;
    return o;
  endfunction

  task automatic cmp(vec_i e, string what);
    vec_i g = from_hw(q_out);
    foreach (e[i]) begin
      checks++;
      if (g[i] != e[i]) begin
        failures++;
        if (failures < 10) $display("%s sym %0d: got %0d exp %0d", what, i, g[i], e[i]);
      end
    end
  endtask

  initial begin
    vec_i l, r0, r1, s1, s2, post;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic bit first = (t % 7 == 0);
      automatic int lim = (t % 3 == 0) ? 31 : 12;
      int best, bestp;
      foreach (l[i]) begin
        l[i] = $urandom_range(lim); r0[i] = $urandom_range(lim); r1[i] = $urandom_range(lim);
      end
      foreach (l[i]) begin
        s1[i] = sat(l[i] + (first ? 0 : r1[i]));
        s2[i] = sat(l[i] + (first ? 0 : r0[i]));
        post[i] = sat(s1[i] + (first ? 0 : r0[i]));
        if (!first && l[i] + r1[i] + r0[i] > 31) n_sat++;
      end
      @(negedge clk);
      a_zero = first; b_reg = 0; store = 1; r_in = to_hw(r1); l_in = to_hw(l);
      #1 cmp(norm(s1), "Q0");
      @(negedge clk);
      store = 0; r_in = to_hw(r0);
      #1 cmp(norm(s2), "Q1");
      @(negedge clk);
      b_reg = 1; l_in = '0;
      #1;
      best = 1 << 30; bestp = 0;
      for (int p = 0; p < 16; p++) if (post[p2poly(p)] < best) begin best = post[p2poly(p)]; bestp = p; end
      checks++;
      if (int'(hd_idx) != bestp) begin
        failures++;
        $display("hard decision got %0d exp %0d", hd_idx, bestp);
      end
      cmp(norm(post), "post");
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
