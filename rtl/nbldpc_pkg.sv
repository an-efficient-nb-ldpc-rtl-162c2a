// nbldpc_pkg -- shared types, constants and look-up tables of the NB-LDPC decoder.
//
// The decoder works on a regular (dv,dc)=(2,4) NB-LDPC code over GF(16) with a 16x32 parity-check
// matrix H, i.e. a (128,64) binary-image code. Messages are vectors of 16 LLRs of 5 bits each.
//
// Vector layout (power representation): element 0 holds the LLR of the field element 0 and
// element 1+k holds the LLR of alpha^k, k = 0..14. Multiplying every symbol of a message by a
// constant alpha^e is then a fixed rotation of elements 1..15, which is what lets the check node
// absorb the H coefficients with wiring only.
//
// Field: GF(16) built on the primitive polynomial x^4 + x + 1 (alpha = x), a choice of this design.
// H: the code family, field size, degrees and message width follow the decoder description; the
// particular matrix below is this design's own (the architecture accepts any regular (2,4) H of
// this size). Column n (0..31) has its two non-zero entries in rows
//   r0(n) = n mod 16
//   r1(n) = (5n + 3) mod 16          for n < 16
//           (5(n-16) + 11) mod 16    for n >= 16
// which gives every row four entries and no 4-cycles. The entry (r_k(n), n) is alpha^e with
// e = (7n + 4k + 1) mod 15. Within a row, its four entries are numbered by increasing column
// ("slots" 0..3). To use another code, change hrow_f and hexp_f.
package nbldpc_pkg;

  localparam int unsigned Q        = 16;  // field size
  localparam int unsigned W        = 5;   // message LLR width
  localparam int unsigned N        = 32;  // variable nodes (symbols per frame)
  localparam int unsigned M        = 16;  // check nodes
  localparam int unsigned DC       = 4;   // check node degree
  localparam int unsigned DV       = 2;   // variable node degree
  localparam int unsigned MAX_ITER = 18;  // maximum decoding iterations
  localparam int unsigned W_CH     = 5;   // channel bit-LLR width (signed)
  localparam int unsigned LLR_MAX  = (1 << W) - 1;

  typedef logic [W-1:0]        llr_t;
  typedef llr_t [Q-1:0]        vec_t;     // 80 bits, power representation
  typedef logic [3:0]          gf_t;      // symbol in polynomial representation

  // Control word of the check node units (all 16 CNUs run in lock step).
  typedef struct packed {
    logic       load1;     // load register array L1
    logic       load2;     // load register array L2
    logic       sel1;      // L1 source: 0 = message memory, 1 = min-max output Lo
    logic       sel2;      // L2 source: 0 = message memory, 1 = min-max output Lo
    logic       shift;     // compute one non-zero output element and rotate L1/L2
    logic       zero;      // compute the output element of the field element 0
    logic [2:0] rd_addr;   // message memory read address (0..3: Q of slot, 4..7: R of slot)
    logic       wr_en;     // write the R message to the message memory
    logic [2:0] wr_addr;   // message memory write address
  } cnu_ctrl_t;

  // ---------------------------------------------------------------- GF(16) arithmetic
  function automatic gf_t gf_mul_poly(gf_t a, gf_t b);
    logic [3:0] p = '0;
    logic [3:0] x = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'b0011 : 4'b0000);
    end
    return p;
  endfunction

  // alpha^k in polynomial form, k = 0..14
  function automatic gf_t gf_exp(int unsigned k);
    gf_t v = 4'd1;
    for (int unsigned i = 0; i < k % 15; i++) v = gf_mul_poly(v, 4'd2);
    return v;
  endfunction

  // exponent of a non-zero element
  function automatic int unsigned gf_log(gf_t a);
    for (int unsigned k = 0; k < 15; k++) if (gf_exp(k) == a) return k;
    return 0;
  endfunction

  // Zech logarithm: alpha^zech(i) = 1 + alpha^i, for i = 1..14
  function automatic int unsigned zech(int unsigned i);
    return gf_log(gf_exp(i) ^ 4'd1);
  endfunction

  // Constant tables (evaluated at elaboration) for use in logic
  typedef gf_t        gf_tab_t  [16];
  typedef logic [3:0] idx_tab_t [16];

  function automatic gf_tab_t make_pidx2poly();
    gf_tab_t t;
    t[0] = 4'd0;
    for (int unsigned k = 0; k < 15; k++) t[1 + k] = gf_exp(k);
    return t;
  endfunction

  function automatic idx_tab_t make_poly2pidx();
    idx_tab_t t;
    t[0] = 4'd0;
    for (int unsigned k = 0; k < 15; k++) t[gf_exp(k)] = 4'(k + 1);
    return t;
  endfunction

  localparam gf_tab_t  PIDX2POLY = make_pidx2poly();
  localparam idx_tab_t POLY2PIDX = make_poly2pidx();

  // power index (0 = zero element, 1+k = alpha^k) to polynomial form
  function automatic gf_t pidx_to_poly(logic [3:0] p);
    return PIDX2POLY[p];
  endfunction

  // polynomial form to power index
  function automatic logic [3:0] poly_to_pidx(gf_t a);
    return POLY2PIDX[a];
  endfunction

  // v'(x) = v(alpha^-e x): message about h*a when v is about a, h = alpha^e
  function automatic vec_t rot_mul(vec_t v, int unsigned e);
    vec_t r;
    r[0] = v[0];
    for (int unsigned k = 0; k < 15; k++) r[1 + k] = v[1 + ((k + 15 - e % 15) % 15)];
    return r;
  endfunction

  // v'(x) = v(alpha^e x): inverse of rot_mul
  function automatic vec_t rot_div(vec_t v, int unsigned e);
    vec_t r;
    r[0] = v[0];
    for (int unsigned k = 0; k < 15; k++) r[1 + k] = v[1 + ((k + e) % 15)];
    return r;
  endfunction

  // ---------------------------------------------------------------- parity-check matrix
  function automatic int unsigned hrow_f(int unsigned n, int unsigned k);
    if (k == 0) return n % 16;
    return (n < 16) ? (5 * n + 3) % 16 : (5 * (n - 16) + 11) % 16;
  endfunction

  function automatic int unsigned hexp_f(int unsigned n, int unsigned k);
    return (7 * n + 4 * k + 1) % 15;
  endfunction

  // column of slot j of row m
  function automatic int unsigned row_col_f(int unsigned m, int unsigned j);
    int unsigned cnt = 0;
    for (int unsigned n = 0; n < N; n++)
      if (hrow_f(n, 0) == m || hrow_f(n, 1) == m) begin
        if (cnt == j) return n;
        cnt++;
      end
    return 0;
  endfunction

  // exponent of the H entry in slot j of row m
  function automatic int unsigned row_exp_f(int unsigned m, int unsigned j);
    int unsigned n = row_col_f(m, j);
    return (hrow_f(n, 0) == m) ? hexp_f(n, 0) : hexp_f(n, 1);
  endfunction

  // slot that edge k of column n occupies in its row
  function automatic int unsigned col_slot_f(int unsigned n, int unsigned k);
    int unsigned m = hrow_f(n, k);
    for (int unsigned j = 0; j < DC; j++) if (row_col_f(m, j) == n) return j;
    return 0;
  endfunction

endpackage
