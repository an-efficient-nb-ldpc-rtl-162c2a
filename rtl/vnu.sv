// vnu -- low-area variable node unit for degree-2 variable nodes.
//
// One element-wise addition of two 16-LLR vectors per clock cycle, then normalisation: the
// minimum of the sum is found by a min tree and subtracted from every element, so the most
// likely symbol gets LLR 0. Operand A is an incoming check message R or 0 (a_zero, used in the
// first pass when only the channel LLRs are sent); operand B is the a priori vector L or the
// sum stored in the 16-register array (b_reg). Sums saturate at 31 (5-bit messages).
//
// Per variable node n with check nodes m0, m1 the control unit issues three cycles:
//   1) A = R(m1,n), B = L(n), store = 1  -> q_out = Q(m0,n); L + R(m1,n) is kept
//   2) A = R(m0,n), B = L(n)             -> q_out = Q(m1,n)
//   3) A = R(m0,n), B = stored sum       -> a posteriori vector; hd_idx is the hard decision
// hd_idx is the power index (0 = zero element, 1+k = alpha^k) of the smallest LLR, lowest
// index on ties. Everything is combinational except the 16-register array. The datapath
// (muxes A and B, adder, min tree, subtractor, register array) follows the decoder description;
// saturation and the tie rule are this design's own.
module vnu
  import nbldpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  vec_t       r_in,
  input  vec_t       l_in,
  input  logic       a_zero,
  input  logic       b_reg,
  input  logic       store,
  output vec_t       q_out,
  output logic [3:0] hd_idx
);

  vec_t sum_reg;
  llr_t sum [16];
  llr_t min_val;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      logic [W:0] s;
      s = {1'b0, (a_zero ? llr_t'(0) : r_in[i])} + {1'b0, (b_reg ? sum_reg[i] : l_in[i])};
      sum[i] = s[W] ? llr_t'(LLR_MAX) : s[W-1:0];
    end
  end

  min_tree u_min (.v(sum), .min_val(min_val), .min_idx(hd_idx));

  always_comb
    for (int i = 0; i < 16; i++) q_out[i] = sum[i] - min_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_reg <= '0;
    else if (store)
      for (int i = 0; i < 16; i++) sum_reg[i] <= sum[i];
  end

endmodule
