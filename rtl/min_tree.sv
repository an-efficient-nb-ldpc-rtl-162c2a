// min_tree -- minimum of 16 LLRs and the position where it sits.
//
// A four-level binary tree of two-input comparators; each node passes on the smaller value
// together with its index ("value and index propagation"). On a tie the lower index wins, so
// the result is the first position holding the minimum. Purely combinational.
// Used by the min-max unit (min comparators) and by the variable node unit (normalisation and
// hard decision). The tree shape is this design's own choice.
module min_tree
  import nbldpc_pkg::*;
(
  input  llr_t       v [16],
  output llr_t       min_val,
  output logic [3:0] min_idx
);

  llr_t       lv_val [31];   // heap layout: node i has children 2i+1, 2i+2; leaves 15..30
  logic [3:0] lv_idx [31];

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      lv_val[15 + i] = v[i];
      lv_idx[15 + i] = 4'(i);
    end
    for (int i = 14; i >= 0; i--) begin
      if (lv_val[2 * i + 2] < lv_val[2 * i + 1]) begin
        lv_val[i] = lv_val[2 * i + 2];
        lv_idx[i] = lv_idx[2 * i + 2];
      end else begin
        lv_val[i] = lv_val[2 * i + 1];
        lv_idx[i] = lv_idx[2 * i + 1];
      end
    end
    min_val = lv_val[0];
    min_idx = lv_idx[0];
  end

endmodule
