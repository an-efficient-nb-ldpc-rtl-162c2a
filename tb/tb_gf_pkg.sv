// tb_gf_pkg -- reference arithmetic for the testbenches, written independently of the RTL
// tables: GF(16) by carry-less multiplication and reduction modulo x^4 + x + 1, conversion
// between polynomial and power order, the min-max step by exhaustive search, the parity-check
// matrix as a dense array and a random codeword generator (Gaussian elimination on H).
// Reference vectors are int arrays indexed by the symbol in polynomial form.
package tb_gf_pkg;
  import nbldpc_pkg::*;

  typedef int vec_i [16];

  // loop bounds held in variables so that the simulator keeps the reference loops as loops
  int nq = 16;
  int nb = 4;
  int nn = 32;

  function automatic int gmul(int a, int b);
    int p = 0;
    for (int i = 0; i < nb; i++) if ((b >> i) & 1) p ^= a << i;
    for (int i = 6; i >= 4; i--) if ((p >> i) & 1) p ^= 'h13 << (i - 4);
    return p;
  endfunction

  function automatic int gpow(int k);   // alpha^k
    int v = 1;
    for (int i = 0; i < k; i++) v = gmul(v, 2);
    return v;
  endfunction

  function automatic int ginv(int a);
    for (int b = 1; b < nq; b++) if (gmul(a, b) == 1) return b;
    return 0;
  endfunction

  function automatic int p2poly(int p);  // power-order position -> symbol
    return (p == 0) ? 0 : gpow(p - 1);
  endfunction

  function automatic int poly2p(int a);
    for (int p = 0; p < nq; p++) if (p2poly(p) == a) return p;
    return 0;
  endfunction

  function automatic vec_t to_hw(vec_i v);
    vec_t r;
    for (int p = 0; p < nq; p++) r[p] = llr_t'(v[p2poly(p)]);
    return r;
  endfunction

  function automatic vec_i from_hw(vec_t r);
    vec_i v;
    for (int p = 0; p < nq; p++) v[p2poly(p)] = int'(r[p]);
    return v;
  endfunction

  function automatic vec_i minmax_ref(vec_i a, vec_i b);
    vec_i o;
    for (int x = 0; x < nq; x++) o[x] = 1 << 30;
    for (int x = 0; x < nq; x++)
      for (int y = 0; y < nq; y++) begin
        int mx = (a[x] > b[y]) ? a[x] : b[y];
        if (mx < o[x ^ y]) o[x ^ y] = mx;
      end
    return o;
  endfunction

  // Min-Max check node rule by brute force: R_j(a) = min over h1 a1 + .. + h4 a4 = 0 with
  // a_j = a of the max of the other three Q messages
  function automatic vec_i cn_ref(vec_i q [4], int h [4], int j);
    vec_i r;
    int o [3];
    int k = 0;
    for (int i = 0; i < nb; i++) if (i != j) begin o[k] = i; k++; end
    for (int a = 0; a < nq; a++) begin
      r[a] = 1 << 30;
      for (int x = 0; x < nq; x++)
        for (int y = 0; y < nq; y++) begin
          int s = gmul(h[j], a) ^ gmul(h[o[0]], x) ^ gmul(h[o[1]], y);
          int z = gmul(ginv(h[o[2]]), s);
          int mx = q[o[0]][x];
          if (q[o[1]][y] > mx) mx = q[o[1]][y];
          if (q[o[2]][z] > mx) mx = q[o[2]][z];
          if (mx < r[a]) r[a] = mx;
        end
    end
    return r;
  endfunction

  function automatic int sat(int v);
    return (v > 31) ? 31 : v;
  endfunction

  // dense H: coefficient in polynomial form, 0 where there is no edge
  typedef int hmat_t [16][32];
  function automatic hmat_t hmat();
    hmat_t h;
    for (int m = 0; m < nq; m++) for (int n = 0; n < nn; n++) h[m][n] = 0;
    for (int n = 0; n < nn; n++)
      for (int k = 0; k < 2; k++) h[hrow_f(n, k)][n] = gpow(hexp_f(n, k));
    return h;
  endfunction

  typedef int cw_t [32];

  function automatic bit is_codeword(cw_t c);
    hmat_t h = hmat();
    for (int m = 0; m < nq; m++) begin
      int s = 0;
      for (int n = 0; n < nn; n++) s ^= gmul(h[m][n], c[n]);
      if (s != 0) return 0;
    end
    return 1;
  endfunction

  // random codeword: reduce H to row echelon form, draw the free symbols, solve the pivots
  function automatic cw_t rand_codeword();
    hmat_t h = hmat();
    int piv [16];
    int rank = 0;
    bit is_piv [32];
    cw_t c;
    for (int n = 0; n < nn; n++) is_piv[n] = 0;
    for (int n = 0; n < 32 && rank < nq; n++) begin
      int r = -1;
      for (int i = rank; i < nq; i++) if (h[i][n] != 0 && r < 0) r = i;
      if (r >= 0) begin
        int iv;
        for (int k = 0; k < nn; k++) begin int t = h[r][k]; h[r][k] = h[rank][k]; h[rank][k] = t; end
        iv = ginv(h[rank][n]);
        for (int k = 0; k < nn; k++) h[rank][k] = gmul(h[rank][k], iv);
        for (int i = 0; i < nq; i++)
          if (i != rank && h[i][n] != 0) begin
            int f = h[i][n];
            for (int k = 0; k < nn; k++) h[i][k] ^= gmul(f, h[rank][k]);
          end
        piv[rank] = n;
        is_piv[n] = 1;
        rank++;
      end
    end
    for (int n = 0; n < nn; n++) c[n] = is_piv[n] ? 0 : int'($urandom_range(15));
    for (int r = 0; r < rank; r++) begin
      int s = 0;
      for (int n = 0; n < nn; n++) if (!is_piv[n]) s ^= gmul(h[r][n], c[n]);
      c[piv[r]] = s;
    end
    return c;
  endfunction

  // Reference Min-Max decoder: flooding schedule, exhaustive check node search, 5-bit
  // saturation and the lowest-power-index tie rule of the RTL. l[n] is the a priori vector of
  // symbol n; sat_cnt counts saturated variable node sums.
  typedef struct { int cw [32]; bit ok; int iters; } res_t;

  function automatic int hd_of(vec_i v);   // lowest power index among the minima
    int best = 1 << 30, bp = 0;
    for (int p = 0; p < nq; p++) if (v[p2poly(p)] < best) begin best = v[p2poly(p)]; bp = p; end
    return p2poly(bp);
  endfunction

  function automatic vec_i normv(vec_i s);
    int mn = 1 << 30;
    vec_i o;
    foreach (s[i]) if (s[i] < mn) mn = s[i];
    foreach (s[i]) o[i] = s[i] - mn;
    return o;
  endfunction

  function automatic res_t ref_decode(vec_i l [32], ref int sat_cnt);
    vec_i qm [16][4], rm [16][4];
    hmat_t h = hmat();
    res_t res;
    for (int it = 0; ; it++) begin
      // variable node pass
      for (int n = 0; n < nn; n++) begin
        int m0 = hrow_f(n, 0), m1 = hrow_f(n, 1);
        int j0 = col_slot_f(n, 0), j1 = col_slot_f(n, 1);
        vec_i s1, s2, post;
        for (int a = 0; a < nq; a++) begin
          int r0 = (it == 0) ? 0 : rm[m0][j0][a];
          int r1 = (it == 0) ? 0 : rm[m1][j1][a];
          if (l[n][a] + r1 > 31 || l[n][a] + r0 > 31) sat_cnt++;
          s1[a] = sat(l[n][a] + r1);
          s2[a] = sat(l[n][a] + r0);
          post[a] = sat(s1[a] + r0);
        end
        qm[m0][j0] = normv(s1);
        qm[m1][j1] = normv(s2);
        res.cw[n] = hd_of(post);
      end
      res.iters = it;
      res.ok = is_codeword(res.cw);
      if (res.ok || it == MAX_ITER) return res;
      // check node pass: exhaustive search over the configurations
      for (int m = 0; m < nq; m++) begin
        int hc [4];
        vec_i q [4];
        for (int j = 0; j < nb; j++) begin hc[j] = h[m][row_col_f(m, j)]; q[j] = qm[m][j]; end
        for (int j = 0; j < nb; j++) rm[m][j] = cn_ref(q, hc, j);
      end
    end
  endfunction

endpackage
