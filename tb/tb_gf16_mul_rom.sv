// tb_gf16_mul_rom -- exhaustive check of the 256 products against carry-less multiplication.
module tb_gf16_mul_rom;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  gf_t a, b, p;
  int  checks = 0, failures = 0;

  gf16_mul_rom dut (.*);

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = gf_t'(i); b = gf_t'(j);
        #1;
        checks++;
        if (int'(p) != gmul(i, j)) begin
          failures++;
          if (failures < 10) $display("%0d*%0d got %0d exp %0d", i, j, p, gmul(i, j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
