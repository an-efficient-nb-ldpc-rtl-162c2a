// symbol_llr_gen -- channel bit LLRs to GF(16) symbol LLR vector.
//
// Input: the four signed bit LLRs of one symbol, bit k being the coefficient of x^k of the
// symbol in polynomial form, with the sign convention LLR = ln(P(bit=0)/P(bit=1)) (negative
// means the bit is more likely 1). Output: the 16-element a priori vector
// L(a) = ln(P(s)/P(a)) in power representation, where s is the most likely symbol: for
// independent bits this is the sum of |LLR| over the bits in which a differs from the bit
// hard decisions, so the most likely symbol gets 0. Sums saturate at 31 (5-bit messages).
// Purely combinational. The formula for L follows the decoder's initialisation step; the
// bit-to-symbol mapping, the bit LLR width and the saturation are this design's own.
module symbol_llr_gen
  import nbldpc_pkg::*;
(
  input  logic [3:0][W_CH-1:0] bit_llr,
  output vec_t                 sym_llr
);

  logic [3:0]      hd;
  logic [W_CH-1:0] mag [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      hd[k]  = bit_llr[k][W_CH-1];
      mag[k] = hd[k] ? W_CH'(-bit_llr[k]) : bit_llr[k];
    end
    for (int p = 0; p < Q; p++) begin
      gf_t         a;
      logic [W+2:0] s;
      a = pidx_to_poly(4'(p));
      s = '0;
      for (int k = 0; k < 4; k++)
        if (a[k] != hd[k]) s += (W+3)'(mag[k]);
      sym_llr[p] = (s > (W+3)'(LLR_MAX)) ? llr_t'(LLR_MAX) : s[W-1:0];
    end
  end

endmodule
