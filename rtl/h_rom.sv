// h_rom -- ROM of the non-zero entries of the parity-check matrix and their positions.
//
// Two asynchronous read ports:
//   column port: for variable node col, the rows m0, m1 of its two entries and the slots they
//                occupy in those rows (used to address the message memories);
//   row port:    for check node row, the columns of its four entries and the entries
//                themselves in polynomial form (used by the parity check).
// The contents come from the matrix defined in nbldpc_pkg and are fixed at elaboration.
module h_rom
  import nbldpc_pkg::*;
(
  input  logic [4:0] col,
  output logic [3:0] col_row  [DV],
  output logic [1:0] col_slot [DV],
  input  logic [3:0] row,
  output logic [4:0] row_col  [DC],
  output gf_t        row_h    [DC]
);

  typedef logic [11:0] col_ent_t [N];   // {row0, slot0, row1, slot1}
  typedef logic [35:0] row_ent_t [M];   // 4 x {col, h}

  function automatic col_ent_t make_col();
    col_ent_t t;
    for (int unsigned n = 0; n < N; n++)
      t[n] = {4'(hrow_f(n, 0)), 2'(col_slot_f(n, 0)), 4'(hrow_f(n, 1)), 2'(col_slot_f(n, 1))};
    return t;
  endfunction

  function automatic row_ent_t make_row();
    row_ent_t t;
    for (int unsigned m = 0; m < M; m++) begin
      logic [35:0] e;
      for (int unsigned j = 0; j < DC; j++)
        e[9*j +: 9] = {5'(row_col_f(m, j)), gf_exp(row_exp_f(m, j))};
      t[m] = e;
    end
    return t;
  endfunction

  localparam col_ent_t COL_TAB = make_col();
  localparam row_ent_t ROW_TAB = make_row();

  always_comb begin
    col_row[0]  = COL_TAB[col][11:8];
    col_slot[0] = COL_TAB[col][7:6];
    col_row[1]  = COL_TAB[col][5:2];
    col_slot[1] = COL_TAB[col][1:0];
    for (int j = 0; j < DC; j++) begin
      row_col[j] = ROW_TAB[row][9*j+4 +: 5];
      row_h[j]   = ROW_TAB[row][9*j +: 4];
    end
  end

endmodule
