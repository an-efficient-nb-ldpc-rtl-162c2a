// tb_minmax_unit -- checks the elementary min-max step against an exhaustive search.
// Random input vectors are loaded, the unit is run for 15 shift cycles and one zero cycle,
// and all 16 output LLRs are compared. Every second step keeps L1 and reloads only L2, which
// checks that the rotating arrays are back in place after a step. The step length (16 cycles
// from load to a valid result) is checked too.
module tb_minmax_unit;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load1 = 0, load2 = 0, shift = 0, zero = 0;
  vec_t l1_in = '0, l2_in = '0, lo;
  int   checks = 0, failures = 0;

  minmax_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_step(bit ld1, vec_i a, vec_i b);
    int cyc = 0;
    @(negedge clk);
    load1 = ld1; load2 = 1;
    l1_in = to_hw(a); l2_in = to_hw(b);
    @(negedge clk);
    load1 = 0; load2 = 0;
    for (int c = 0; c < 16; c++) begin
      shift = (c < 15); zero = (c == 15);
      @(negedge clk);
      cyc++;
    end
    shift = 0; zero = 0;
    checks++;
    if (cyc != 16) failures++;
  endtask

  initial begin
    vec_i a, b, exp_v, got;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic bit keep = (t % 2 == 1);
      if (!keep) for (int i = 0; i < 16; i++) a[i] = $urandom_range(31);
      for (int i = 0; i < 16; i++) b[i] = (t % 5 == 0) ? $urandom_range(3) : $urandom_range(31);
      run_step(!keep, a, b);
      exp_v = minmax_ref(a, b);
      got = from_hw(lo);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (got[i] != exp_v[i]) begin
          failures++;
          if (failures < 10) $display("step %0d symbol %0d: got %0d expected %0d", t, i, got[i], exp_v[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
