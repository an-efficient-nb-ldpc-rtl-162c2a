// tb_min_tree -- minimum value and first index of the minimum over 16 inputs, random and
// with forced ties.
module tb_min_tree;
  import nbldpc_pkg::*;

  llr_t       v [16];
  llr_t       min_val;
  logic [3:0] min_idx;
  int         checks = 0, failures = 0;

  min_tree dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int mn, mi;
      foreach (v[i]) v[i] = llr_t'($urandom_range((t % 2) ? 31 : 3));
      #1;
      mn = 99; mi = 0;
      for (int i = 0; i < 16; i++) if (int'(v[i]) < mn) begin mn = int'(v[i]); mi = i; end
      checks++;
      if (int'(min_val) != mn || int'(min_idx) != mi) begin
        failures++;
        if (failures < 10) $display("got %0d@%0d exp %0d@%0d", min_val, min_idx, mn, mi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
