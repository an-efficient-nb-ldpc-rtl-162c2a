// parity_check -- syndrome check of the tentative codeword.
//
// The hard-decision symbols arrive from the variable node unit one per variable node, in
// column order, as power indices; they are converted to polynomial form and shifted into a
// 32-symbol shift register. After start, one parity-check equation is evaluated per cycle:
// the four symbols of row m are multiplied by their H entries in four GF(16) multiplier ROMs
// and added with XOR. done pulses 17 cycles after start (16 rows + 1) with ok high when all
// 16 syndromes are zero. cw holds the 32 symbols (cw[n] = symbol of variable node n) and is
// the decoder output. The row, its columns and its H entries come from the H ROM (row_addr
// out, row_col / row_h in). Storing the symbols in a shift register, LUT multipliers and XOR
// additions follow the decoder description; one row per cycle is this design's choice.
module parity_check
  import nbldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hd_valid,
  input  logic [3:0]       hd_idx,
  input  logic             start,
  output logic             done,
  output logic             ok,
  output gf_t [N-1:0]      cw,
  output logic [3:0]       row_addr,
  input  logic [4:0]       row_col [DC],
  input  gf_t              row_h   [DC]
);

  logic       running, all_zero;
  logic [3:0] row;
  gf_t        prod [DC];
  gf_t        syn;

  for (genvar j = 0; j < DC; j++) begin : g_mul
    gf16_mul_rom u_mul (.a(row_h[j]), .b(cw[row_col[j]]), .p(prod[j]));
  end

  always_comb begin
    syn = '0;
    for (int j = 0; j < DC; j++) syn ^= prod[j];
  end

  assign row_addr = row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw       <= '0;
      running  <= 1'b0;
      all_zero <= 1'b0;
      row      <= '0;
      done     <= 1'b0;
      ok       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (hd_valid) cw <= {pidx_to_poly(hd_idx), cw[N-1:1]};
      if (start) begin
        running  <= 1'b1;
        all_zero <= 1'b1;
        row      <= '0;
      end else if (running) begin
        all_zero <= all_zero && (syn == '0);
        row      <= row + 4'd1;
        if (row == 4'(M - 1)) begin
          running <= 1'b0;
          done    <= 1'b1;
          ok      <= all_zero && (syn == '0);
        end
      end
    end
  end

  // a new check is not started while one is running
  a_start: assert property (@(posedge clk) disable iff (!rst_n) start |-> !running);

endmodule
