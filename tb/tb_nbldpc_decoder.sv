// tb_nbldpc_decoder -- end-to-end test of the decoder at its default size.
//
// Frames are random codewords of the code (from Gaussian elimination on H), mapped to bits,
// sent over a simulated noisy channel and quantised to 5-bit bit LLRs. Each frame is decoded
// by the RTL and by the reference Min-Max decoder of tb_gf_pkg (flooding schedule, exhaustive
// check node search instead of forward-backward, same 5-bit saturation, same lowest-index
// tie rule for the hard decision). Decoded word, success flag, iteration count and the
// cycle count (32 load cycles + 115 + 201 per iteration) must match exactly, and every frame,
// the 18-iteration ones included, must meet 2 Mbit/s at a 60.9 MHz clock.
// Counted mechanisms, each of which must occur: decoding done after the first pass (no
// iteration), early termination after some iterations, the 18-iteration limit, a cancelled
// check node pass, saturated sums in the variable node, decoded word equal to the codeword.
module tb_nbldpc_decoder;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic                 clk = 0, rst_n = 0;
  logic                 in_valid = 0, in_ready, out_valid, out_ok, busy;
  logic [3:0][W_CH-1:0] in_llr = '0;
  logic [4:0]           out_iters;
  gf_t [N-1:0]          out_cw;
  int                   checks = 0, failures = 0;
  int                   n_zero_iter = 0, n_early = 0, n_limit = 0, n_cancel = 0, n_sat = 0, n_corrected = 0;

  nbldpc_decoder dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (dut.cn_cancel) n_cancel++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  function automatic int noise(int s);     // roughly Gaussian, spread s
    int v = 0;
    for (int i = 0; i < 4; i++) v += int'($urandom_range(2 * s)) - s;
    return v / 2;
  endfunction

  task automatic run_frame(int mean, int spread);
    cw_t c;
    int  llr [32][4];
    vec_i l [32];
    res_t e;
    int cyc = 0, sc = 0;
    c = rand_codeword();
    for (int n = 0; n < 32; n++) begin
      for (int k = 0; k < 4; k++) begin
        int v = (((c[n] >> k) & 1) ? -mean : mean) + noise(spread);
        llr[n][k] = (v > 15) ? 15 : (v < -16) ? -16 : v;
      end
      for (int a = 0; a < 16; a++) begin
        int s = 0;
        for (int k = 0; k < 4; k++)
          if (((a >> k) & 1) != (llr[n][k] < 0 ? 1 : 0)) s += (llr[n][k] < 0) ? -llr[n][k] : llr[n][k];
        l[n][a] = sat(s);
      end
    end
    e = ref_decode(l, sc);
    if (sc > 0) n_sat++;
    // load the frame
    for (int n = 0; n < 32; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 4; k++) in_llr[k] = W_CH'(llr[n][k]);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    cyc = 1;
    while (!out_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 115 + 201 * e.iters) begin failures++; $display("cycles %0d expected %0d", cyc, 115 + 201 * e.iters); end
    // worst-case rate at the 60.9 MHz clock of the reference FPGA implementation: >= 2 Mbit/s
    checks++;
    if (real'(128) * 60.9e6 / real'(cyc + 32) < 2.0e6) begin failures++; $display("rate below 2 Mbit/s"); end
    checks++;
    if (int'(out_iters) != e.iters) begin failures++; $display("iterations %0d expected %0d", out_iters, e.iters); end
    checks++;
    if (out_ok != e.ok) begin failures++; $display("ok %0d expected %0d", out_ok, e.ok); end
    for (int n = 0; n < 32; n++) begin
      checks++;
      if (int'(out_cw[n]) != e.cw[n]) begin
        failures++;
        if (failures < 20) $display("symbol %0d: %0d expected %0d", n, out_cw[n], e.cw[n]);
      end
    end
    if (e.ok && e.iters == 0) n_zero_iter++;
    if (e.ok && e.iters > 0) n_early++;
    if (e.iters == MAX_ITER) n_limit++;
    if (e.ok && e.iters > 0) begin
      bit same = 1;
      for (int n = 0; n < 32; n++) if (e.cw[n] != c[n]) same = 0;
      if (same) n_corrected++;
    end
    $display("frame mean=%0d spread=%0d: iterations %0d ok %0d, %0d cycles", mean, spread, out_iters, out_ok, cyc + 32);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(8, 0);      // clean channel
    run_frame(5, 6);      // moderate noise
    run_frame(5, 7);
    run_frame(4, 8);
    run_frame(1, 10);     // heavy noise
    checks++; if (n_zero_iter == 0) begin failures++; $display("no frame decoded without iterations"); end
    checks++; if (n_early == 0)     begin failures++; $display("no early termination"); end
    checks++; if (n_limit == 0)     begin failures++; $display("iteration limit never reached"); end
    checks++; if (n_cancel == 0)    begin failures++; $display("no check node pass cancelled"); end
    checks++; if (n_sat == 0)       begin failures++; $display("no saturation"); end
    checks++; if (n_corrected == 0) begin failures++; $display("no frame corrected"); end
    $display("mechanisms: no-iteration %0d early-stop %0d limit %0d cancel %0d saturation %0d corrected %0d",
             n_zero_iter, n_early, n_limit, n_cancel, n_sat, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
