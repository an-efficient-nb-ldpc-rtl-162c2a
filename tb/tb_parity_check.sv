// tb_parity_check -- shifts in codewords (random, from H) and corrupted words as power
// indices, runs the check and compares ok with the syndrome computed independently; also
// checks the stored word and the 17-cycle check latency.
module tb_parity_check;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        hd_valid = 0, start = 0, done, ok;
  logic [3:0]  hd_idx = '0, row_addr;
  gf_t [N-1:0] cw;
  logic [4:0]  row_col [DC];
  gf_t         row_h [DC];
  logic [4:0]  col = '0;
  logic [3:0]  col_row [DV];
  logic [1:0]  col_slot [DV];
  int          checks = 0, failures = 0, n_ok = 0, n_bad = 0;

  parity_check dut (.*);
  h_rom u_rom (.col, .col_row, .col_slot, .row(row_addr), .row_col, .row_h);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int cyc;
      bit exp_ok;
      c = rand_codeword();
      if (t % 2 == 1) begin
        int n = $urandom_range(31);
        c[n] ^= $urandom_range(1, 15);
      end
      exp_ok = is_codeword(c);
      if (exp_ok) n_ok++; else n_bad++;
      for (int n = 0; n < 32; n++) begin
        @(negedge clk);
        hd_valid = 1; hd_idx = 4'(poly2p(c[n]));
      end
      @(negedge clk);
      hd_valid = 0; start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 17) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (ok != exp_ok) begin failures++; $display("word %0d ok %0d exp %0d", t, ok, exp_ok); end
      for (int n = 0; n < 32; n++) begin
        checks++;
        if (int'(cw[n]) != c[n]) failures++;
      end
    end
    checks++;
    if (n_ok == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
