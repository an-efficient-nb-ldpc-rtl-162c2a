// tb_awgn_cer -- codeword error rate workload: random codewords, BPSK over an AWGN channel at
// Eb/N0 = 1, 2 and 3 dB (code rate 1/2), decoded by the full-size decoder.
//
// Channel: bit b is sent as +1 (b = 0) or -1 (b = 1); noise variance sigma^2 = 1/(2 R Eb/N0).
// The bit LLR 2y/sigma^2 is scaled by 2 and rounded to 5 signed bits (-16..15); this
// quantisation of the channel values is an assumption of the test. Every frame is also decoded
// by the reference Min-Max decoder (tb_gf_pkg) and the RTL must agree bit for bit. The test
// prints the codeword error rate per point; it also requires that the error count does not
// grow with Eb/N0 and that at least one frame is corrected by iterating.
// FRAMES frames per point keep the run short; an error-rate curve needs far more.
module tb_awgn_cer;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  localparam int FRAMES = 24;
  localparam int NPTS = 3;
  localparam real EBN0_DB [NPTS] = '{1.0, 2.0, 3.0};

  logic                 clk = 0, rst_n = 0;
  logic                 in_valid = 0, in_ready, out_valid, out_ok, busy;
  logic [3:0][W_CH-1:0] in_llr = '0;
  logic [4:0]           out_iters;
  gf_t [N-1:0]          out_cw;
  int                   checks = 0, failures = 0, n_iter_fix = 0;
  int                   errs [NPTS];

  nbldpc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * NPTS * 4000 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1 = (real'($urandom) + 1.0) / 4294967297.0;
    real u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  task automatic run_frame(real sigma, output bit cw_err);
    cw_t c;
    int  llr [32][4];
    vec_i l [32];
    res_t e;
    int sc = 0;
    bit same = 1;
    c = rand_codeword();
    for (int n = 0; n < 32; n++) begin
      for (int k = 0; k < 4; k++) begin
        real y = (((c[n] >> k) & 1) ? -1.0 : 1.0) + sigma * gauss();
        int  v = $rtoi(2.0 * 2.0 * y / (sigma * sigma) + ((y >= 0) ? 0.5 : -0.5));
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
    for (int n = 0; n < 32; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 4; k++) in_llr[k] = W_CH'(llr[n][k]);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (int'(out_iters) != e.iters || out_ok != e.ok) failures++;
    for (int n = 0; n < 32; n++) begin
      checks++;
      if (int'(out_cw[n]) != e.cw[n]) failures++;
      if (int'(out_cw[n]) != c[n]) same = 0;
    end
    if (same && out_iters > 0) n_iter_fix++;
    cw_err = !same;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPTS; p++) begin
      automatic real ebn0 = 10.0 ** (EBN0_DB[p] / 10.0);
      automatic real sigma = $sqrt(1.0 / (2.0 * 0.5 * ebn0));
      errs[p] = 0;
      for (int f = 0; f < FRAMES; f++) begin
        bit ce;
        run_frame(sigma, ce);
        if (ce) errs[p]++;
      end
      $display("Eb/N0 %0.1f dB: %0d of %0d codewords in error (CER %0.3f)", EBN0_DB[p], errs[p], FRAMES,
               real'(errs[p]) / real'(FRAMES));
    end
    checks++;
    if (errs[NPTS-1] > errs[0]) failures++;
    checks++;
    if (n_iter_fix == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
