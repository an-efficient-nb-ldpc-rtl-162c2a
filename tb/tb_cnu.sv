// tb_cnu -- checks one check node pass of a CNU with its sequencer and message memory.
// Four random Q messages are written into the memory, a pass is started, and the four R
// messages written back are compared with the Min-Max check node rule evaluated by brute
// force over all symbol configurations satisfying h1 a1 + h2 a2 + h3 a3 + h4 a4 = 0.
// Runs for several rows of H (different coefficients) and checks the 104-cycle pass length.
module tb_cnu;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic      clk = 0, rst_n = 0;
  logic      start = 0, cancel = 0, busy, done;
  cnu_ctrl_t ctrl;
  logic      tb_we = 0;
  logic [2:0] tb_addr = '0;
  vec_t      tb_wdata = '0;
  vec_t      rd_data, r_out [4];
  int        checks = 0, failures = 0;
  localparam int ROWS [4] = '{0, 5, 10, 15};

  cnu_sched u_sched (.clk, .rst_n, .start, .cancel, .busy, .done, .ctrl);

  // one memory per tested row, all written with the same Q messages
  for (genvar g = 0; g < 4; g++) begin : g_dut
    vec_t rd;
    dist_ram #(.DEPTH(8), .WIDTH(80)) u_mem (
      .clk,
      .we    (busy ? ctrl.wr_en : tb_we),
      .waddr (busy ? ctrl.wr_addr : tb_addr),
      .wdata (busy ? r_out[g] : tb_wdata),
      .raddr (busy ? ctrl.rd_addr : tb_addr),
      .rdata (rd)
    );
    cnu #(.ROW(ROWS[g])) u_cnu (.clk, .rst_n, .ctrl, .mem_rd_data(rd), .r_out(r_out[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_i q [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int cyc;
      // normalised random messages: one symbol at 0
      for (int i = 0; i < 4; i++) begin
        for (int a = 0; a < 16; a++) q[i][a] = $urandom_range(31);
        q[i][$urandom_range(15)] = 0;
      end
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        tb_we = 1; tb_addr = 3'(i); tb_wdata = to_hw(q[i]);
      end
      @(negedge clk);
      tb_we = 0; start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 104) begin failures++; $display("pass length %0d", cyc); end
      @(negedge clk);
      for (int g = 0; g < 4; g++) begin
        int h [4];
        for (int j = 0; j < 4; j++) h[j] = gpow(row_exp_f(ROWS[g], j));
        for (int j = 0; j < 4; j++) begin
          vec_i exp_v, got;
          exp_v = cn_ref(q, h, j);
          tb_addr = 3'(4 + j);
          #1;
          got = from_hw(g == 0 ? g_dut[0].rd : g == 1 ? g_dut[1].rd : g == 2 ? g_dut[2].rd : g_dut[3].rd);
          for (int a = 0; a < 16; a++) begin
            checks++;
            if (got[a] != exp_v[a]) begin
              failures++;
              if (failures < 10) $display("row %0d slot %0d sym %0d: got %0d exp %0d", ROWS[g], j, a, got[a], exp_v[a]);
            end
          end
        end
      end
    end
    // a cancelled pass returns to idle at once
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    cancel = 1;
    @(negedge clk); cancel = 0;
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
