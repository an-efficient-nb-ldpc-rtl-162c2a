// gf16_mul_rom -- GF(16) multiplier as an asynchronous look-up table.
//
// Both operands and the product are in polynomial representation. The 256-entry table is
// filled at elaboration from the field arithmetic (shift-and-add modulo x^4 + x + 1) and is
// read combinationally, so it maps to logic LUTs. The parity check uses four of them.
module gf16_mul_rom
  import nbldpc_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);

  typedef gf_t tab_t [256];
  function automatic tab_t make_tab();
    tab_t t;
    for (int i = 0; i < 256; i++) t[i] = gf_mul_poly(gf_t'(i >> 4), gf_t'(i & 15));
    return t;
  endfunction
  localparam tab_t TAB = make_tab();

  assign p = TAB[{a, b}];

endmodule
