// minmax_unit -- elementary min-max step of the forward-backward check node algorithm.
//
// Computes Lo(a) = min over a1 + a2 = a of max(L1(a1), L2(a2)) for 16-element GF(16) LLR
// vectors held in power representation, one output element per clock cycle.
//
// How it works: L1 and L2 are kept in register arrays (the zero-element LLR apart, the 15
// others in a rotating shift register). In cycle c (c = 0..14) both arrays have been rotated
// by c, so position i holds the LLR of alpha^(c+i). Since alpha^(c+i) + alpha^(c+zech(i)) =
// alpha^c, the 16 pairs that add up to alpha^c always sit at the same positions: pairs
// (L1[i], L2[zech(i)]) for i = 1..14, plus (L1(0), L2[0]) and (L1[0], L2(0)). The max
// comparators and the 16-input min tree are therefore wired once and never switched; the
// result is pushed into the output shift register. A 16th cycle ("zero") computes the
// element 0, whose pairs are (L1(a), L2(a)) for all a. After 15 rotations the input arrays
// are back in place, so an input vector can be reused by the next step without reloading.
// Storing vectors in power representation with shift registers and a fixed comparator
// network follows the decoder description; the exact cycle order is this design's own.
//
// Interface: load1/load2 capture l1_in/l2_in; shift (15 cycles) then zero (1 cycle) produce
// lo, valid from the cycle after the zero cycle until the next shift. A step takes 16 cycles.
module minmax_unit
  import nbldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load1,
  input  logic load2,
  input  vec_t l1_in,
  input  vec_t l2_in,
  input  logic shift,
  input  logic zero,
  output vec_t lo
);

  typedef int unsigned zech_tab_t [15];
  function automatic zech_tab_t make_zech();
    zech_tab_t t;
    t[0] = 0;
    for (int unsigned i = 1; i < 15; i++) t[i] = zech(i);
    return t;
  endfunction
  localparam zech_tab_t ZECH = make_zech();

  llr_t z1, z2;          // LLR of the zero element
  llr_t r1 [15];         // rotating arrays of the non-zero elements
  llr_t r2 [15];
  llr_t lo_nz [15];      // output shift register, non-zero elements
  llr_t lo_z;            // output, zero element

  function automatic llr_t max2(llr_t a, llr_t b);
    return (a > b) ? a : b;
  endfunction

  llr_t cand_nz [16];    // max comparators for the non-zero output
  llr_t cand_z  [16];    // max comparators for the zero output
  llr_t out_nz, out_z;

  always_comb begin
    cand_nz[0] = max2(z1, r2[0]);
    cand_nz[1] = max2(r1[0], z2);
    for (int unsigned i = 1; i < 15; i++) cand_nz[i + 1] = max2(r1[i], r2[ZECH[i]]);
    cand_z[0] = max2(z1, z2);
    for (int unsigned i = 0; i < 15; i++) cand_z[i + 1] = max2(r1[i], r2[i]);
  end

  min_tree u_min_nz (.v(cand_nz), .min_val(out_nz), .min_idx());
  min_tree u_min_z  (.v(cand_z),  .min_val(out_z),  .min_idx());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z1 <= '0;
      z2 <= '0;
      lo_z <= '0;
      for (int i = 0; i < 15; i++) begin
        r1[i] <= '0;
        r2[i] <= '0;
        lo_nz[i] <= '0;
      end
    end else begin
      if (load1) begin
        z1 <= l1_in[0];
        for (int i = 0; i < 15; i++) r1[i] <= l1_in[1 + i];
      end else if (shift) begin
        for (int i = 0; i < 15; i++) r1[i] <= r1[(i + 1) % 15];
      end
      if (load2) begin
        z2 <= l2_in[0];
        for (int i = 0; i < 15; i++) r2[i] <= l2_in[1 + i];
      end else if (shift) begin
        for (int i = 0; i < 15; i++) r2[i] <= r2[(i + 1) % 15];
      end
      if (shift) begin
        for (int i = 0; i < 14; i++) lo_nz[i] <= lo_nz[i + 1];
        lo_nz[14] <= out_nz;
      end
      if (zero) lo_z <= out_z;
    end
  end

  always_comb begin
    lo[0] = lo_z;
    for (int i = 0; i < 15; i++) lo[1 + i] = lo_nz[i];
  end

endmodule
