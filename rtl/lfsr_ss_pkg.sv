// lfsr_ss_pkg: GF(2) matrix algebra for the state-space form of an LFSR.
//
// An LFSR of order K with generator g(x) = g_0 + g_1 x + ... + x^K updates
// its state as x(n+1) = A x(n) + b u(n), where A is the companion matrix of
// g(x) (ones on the sub-diagonal, g_0..g_{K-1} in the last column) and
// b = [g_0 .. g_{K-1}]^T. Consuming L bits per clock gives
// x(mL+L) = A^L x(mL) + B_L u_L(mL). A change of basis x = T xt turns this
// into xt(mL+L) = ALt xt + BLt u_L, y = T xt, with ALt = T^-1 A^L T and
// BLt = T^-1 B_L. Here T is the Krylov matrix [v, A^L v, ..., A^(L(K-1)) v]
// for the first unit vector v = e_j that makes it non-singular; with that
// choice ALt is a companion matrix whose last column holds the
// characteristic polynomial of A^L, so the feedback loop has the same shape
// as the serial LFSR. (For L a power of two and g irreducible that
// polynomial is g itself.) The choice of T among the many valid ones is this
// design's own; the document only proves that one exists.
//
// Everything here is evaluated at elaboration time to produce constant
// matrices; no function is meant to become hardware by itself.
//
// Storage convention: a matrix is an array of column vectors, m[j] = column
// j, bit r of a column = row r. Dimensions up to MAXD (64) are supported.
// Input bit ordering: u_L(mL) = [u(mL) .. u(mL+L-1)]; the message enters
// most significant bit first, so bit i of an L-bit input word is u(mL+L-1-i)
// and is weighted by column A^i b of B_L.
package lfsr_ss_pkg;

  localparam int MAXD = 64;

  typedef logic [MAXD-1:0]            gf2_vec_t;
  typedef gf2_vec_t [MAXD-1:0]        gf2_mat_t;

  // Bits 0..k-1 set.
  function automatic gf2_vec_t vmask(int k);
    gf2_vec_t m = '0;
    for (int i = 0; i < k; i++) m[i] = 1'b1;
    return m;
  endfunction

  // One serial LFSR step with zero input: A*v.
  function automatic gf2_vec_t a_step(gf2_vec_t v, gf2_vec_t poly, int k);
    gf2_vec_t r;
    r = (v << 1) & vmask(k);
    if (v[k-1]) r = r ^ (poly & vmask(k));
    return r;
  endfunction

  // m * v, m having n columns.
  function automatic gf2_vec_t mat_vec(gf2_mat_t m, gf2_vec_t v, int n);
    gf2_vec_t r = '0;
    for (int j = 0; j < n; j++) if (v[j]) r = r ^ m[j];
    return r;
  endfunction

  // a * b, a having n columns and b having c columns.
  function automatic gf2_mat_t mat_mul(gf2_mat_t a, gf2_mat_t b, int n, int c);
    gf2_mat_t r = '0;
    for (int j = 0; j < c; j++) r[j] = mat_vec(a, b[j], n);
    return r;
  endfunction

  // Transpose of a rows x cols matrix.
  function automatic gf2_mat_t transpose(gf2_mat_t m, int rows, int cols);
    gf2_mat_t r = '0;
    for (int j = 0; j < cols; j++)
      for (int i = 0; i < rows; i++) r[i][j] = m[j][i];
    return r;
  endfunction

  // A^l: column j is x^(j+l) mod g(x).
  function automatic gf2_mat_t a_pow(gf2_vec_t poly, int k, int l);
    gf2_mat_t r = '0;
    for (int j = 0; j < k; j++) begin
      gf2_vec_t v;
      v = '0;
      v[j] = 1'b1;
      for (int s = 0; s < l; s++) v = a_step(v, poly, k);
      r[j] = v;
    end
    return r;
  endfunction

  // B_L (k x l): column i is A^i b with b = g.
  function automatic gf2_mat_t bl_mat(gf2_vec_t poly, int k, int l);
    gf2_mat_t r = '0;
    gf2_vec_t v = poly & vmask(k);
    for (int i = 0; i < l; i++) begin
      r[i] = v;
      v = a_step(v, poly, k);
    end
    return r;
  endfunction

  // Rank of a k x k matrix by Gaussian elimination.
  function automatic int rank(gf2_mat_t m, int k);
    gf2_mat_t rows = transpose(m, k, k);
    int rk = 0;
    for (int c = 0; c < k; c++) begin
      int p;
      p = -1;
      for (int r = rk; r < k; r++) if (p < 0 && rows[r][c]) p = r;
      if (p >= 0) begin
        gf2_vec_t t;
        t = rows[p];
        rows[p]  = rows[rk];
        rows[rk] = t;
        for (int r = 0; r < k; r++) if (r != rk && rows[r][c]) rows[r] = rows[r] ^ rows[rk];
        rk++;
      end
    end
    return rk;
  endfunction

  // Inverse of a non-singular k x k matrix (Gauss-Jordan on rows).
  function automatic gf2_mat_t inverse(gf2_mat_t m, int k);
    gf2_mat_t lhs = transpose(m, k, k);
    gf2_mat_t rhs = '0;
    for (int r = 0; r < k; r++) rhs[r][r] = 1'b1;
    for (int c = 0; c < k; c++) begin
      int p;
      p = -1;
      for (int r = c; r < k; r++) if (p < 0 && lhs[r][c]) p = r;
      if (p >= 0) begin
        gf2_vec_t t;
        t = lhs[p]; lhs[p] = lhs[c]; lhs[c] = t;
        t = rhs[p]; rhs[p] = rhs[c]; rhs[c] = t;
        for (int r = 0; r < k; r++)
          if (r != c && lhs[r][c]) begin
            lhs[r] = lhs[r] ^ lhs[c];
            rhs[r] = rhs[r] ^ rhs[c];
          end
      end
    end
    return transpose(rhs, k, k);
  endfunction

  // Krylov matrix [v, M v, ..., M^(k-1) v].
  function automatic gf2_mat_t krylov(gf2_mat_t m, gf2_vec_t v, int k);
    gf2_mat_t r = '0;
    for (int j = 0; j < k; j++) begin
      r[j] = v;
      v = mat_vec(m, v, k);
    end
    return r;
  endfunction

  // Index of the unit vector that seeds T, or -1 when A^L is not similar to
  // a companion matrix for any unit seed.
  function automatic int t_seed(gf2_vec_t poly, int k, int l);
    gf2_mat_t al = a_pow(poly, k, l);
    for (int e = 0; e < k; e++) begin
      gf2_vec_t v;
      v = '0;
      v[e] = 1'b1;
      if (rank(krylov(al, v, k), k) == k) return e;
    end
    return -1;
  endfunction

  // Transformation matrix T (also the output matrix CLt).
  function automatic gf2_mat_t t_mat(gf2_vec_t poly, int k, int l);
    gf2_vec_t v = '0;
    int e = t_seed(poly, k, l);
    if (e >= 0) v[e] = 1'b1;
    return krylov(a_pow(poly, k, l), v, k);
  endfunction

  // ALt = T^-1 A^L T.
  function automatic gf2_mat_t alt_mat(gf2_vec_t poly, int k, int l);
    gf2_mat_t t = t_mat(poly, k, l);
    return mat_mul(inverse(t, k), mat_mul(a_pow(poly, k, l), t, k, k), k, k);
  endfunction

  // Last column of the companion matrix ALt: the feedback taps.
  function automatic gf2_vec_t alt_coef(gf2_vec_t poly, int k, int l);
    gf2_mat_t m = alt_mat(poly, k, l);
    return m[k-1];
  endfunction

  // 1 when ALt has the companion shape (unit sub-diagonal in columns 0..k-2).
  function automatic bit alt_is_companion(gf2_vec_t poly, int k, int l);
    gf2_mat_t m = alt_mat(poly, k, l);
    for (int j = 0; j < k - 1; j++) begin
      gf2_vec_t e;
      e = '0;
      e[j+1] = 1'b1;
      if (m[j] != e) return 1'b0;
    end
    return 1'b1;
  endfunction

  // BLt = T^-1 B_L (k x l).
  function automatic gf2_mat_t blt_mat(gf2_vec_t poly, int k, int l);
    return mat_mul(inverse(t_mat(poly, k, l), k), bl_mat(poly, k, l), k, l);
  endfunction

  // Transformed initial state xt(0) = T^-1 x(0).
  function automatic gf2_vec_t xt_init(gf2_vec_t poly, int k, int l, gf2_vec_t init);
    return mat_vec(inverse(t_mat(poly, k, l), k), init, k);
  endfunction

endpackage
