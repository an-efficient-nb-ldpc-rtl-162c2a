// tb_h_rom -- checks both ports of the H ROM: the four columns of some rows against the
// matrix listing, consistency of the column port with the row port, the coefficients
// against alpha^e computed independently, and the regular degrees (4 per row, 2 per column).
module tb_h_rom;
  import nbldpc_pkg::*;
  import tb_gf_pkg::*;

  logic [4:0] col;
  logic [3:0] col_row  [DV];
  logic [1:0] col_slot [DV];
  logic [3:0] row;
  logic [4:0] row_col  [DC];
  gf_t        row_h    [DC];
  int         checks = 0, failures = 0;

  h_rom dut (.*);

  // columns of rows 0, 1, 7 and 15 of the matrix
  localparam int LIST [4][4] = '{'{0, 9, 16, 17}, '{1, 6, 17, 30}, '{4, 7, 23, 28}, '{12, 15, 20, 31}};
  localparam int LROW [4] = '{0, 1, 7, 15};

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  initial begin
    int deg [16];
    foreach (deg[i]) deg[i] = 0;
    for (int k = 0; k < 4; k++) begin
      row = 4'(LROW[k]);
      #1;
      for (int j = 0; j < 4; j++) chk(int'(row_col[j]) == LIST[k][j], "row listing");
    end
    for (int n = 0; n < 32; n++) begin
      col = 5'(n);
      #1;
      chk(col_row[0] != col_row[1], "distinct rows");
      for (int k = 0; k < 2; k++) begin
        row = col_row[k];
        #1;
        deg[col_row[k]]++;
        chk(int'(row_col[col_slot[k]]) == n, "column/row port agree");
        chk(int'(row_h[col_slot[k]]) == gpow(hexp_f(n, k)), "coefficient");
        chk(row_h[col_slot[k]] != 0, "non-zero entry");
      end
    end
    foreach (deg[i]) chk(deg[i] == 4, "row degree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
