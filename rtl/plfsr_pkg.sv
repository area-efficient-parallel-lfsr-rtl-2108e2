// plfsr_pkg: types and elaboration-time GF(2) matrix functions of the
// state-space parallel LFSR.
//
// The serial Galois LFSR of degree n is X(t+1) = A*X(t) + B*u(t), with state
// X = [X_0 .. X_{n-1}] where X_0 is the coefficient of s^(n-1) (the bit fed
// back) and X_{n-1} that of s^0.  A has the generator coefficients
// g_{n-1} .. g_0 in its first column and ones on its superdiagonal, and
// B = (g_{n-1} .. g_0)^T.  Applying v input bits per clock gives
// X(t+v) = A^v*X(t) + Bv*U, where column j of Bv is A^(v-1-j)*B and U[j] is
// the j-th bit in time.  A nonsingular transformation X = T*X^T, with T the
// upper-triangular Toeplitz matrix built from the vector V = [1, v_1 .. v_{n-1}],
// turns this into X^T(t+1) = AvT*X^T(t) + BvT*U with AvT = T^-1*A^v*T and
// BvT = T^-1*Bv.  All of this follows the formulation the design is built on;
// the function decomposition below is this implementation's own.
//
// Conventions used throughout: a matrix is mat_t, m[i][j] is row i, column j,
// and a vector bit x[i] is element i in the order above.  Parameters POLY and
// TVEC are given the way CRC tables print them: POLY[k] = g_k (the leading
// s^n term is implied), TVEC[n-1] = 1 is the leading element of V and
// TVEC[n-1-k] = v_k.  All functions are meant for constant evaluation only.
package plfsr_pkg;

  // Largest degree n and parallelism v the functions handle.
  localparam int unsigned MAXN = 64;

  typedef logic [MAXN-1:0]           vec_t;
  typedef logic [MAXN-1:0][MAXN-1:0] mat_t;

  // One step of the unforced LFSR: (A*x)_i = g_{n-1-i}*x_0 + x_{i+1}.
  function automatic vec_t lfsr_step(vec_t x, int unsigned n, vec_t poly);
    vec_t y;
    y = '0;
    for (int unsigned i = 0; i < n; i++) begin
      y[i] = (poly[n-1-i] & x[0]) ^ ((i + 1 < n) ? x[i+1] : 1'b0);
    end
    return y;
  endfunction

  // The transition matrix A itself.
  function automatic mat_t a_matrix(int unsigned n, vec_t poly);
    mat_t m;
    m = '0;
    for (int unsigned i = 0; i < n; i++) begin
      m[i][0] = poly[n-1-i];
      if (i + 1 < n) m[i][i+1] = 1'b1;
    end
    return m;
  endfunction

  // Vector V as elements [1, v_1, .., v_{n-1}] (element k in bit k).
  function automatic vec_t t_elems(int unsigned n, vec_t tvec);
    vec_t e;
    e = '0;
    for (int unsigned k = 0; k < n; k++) e[k] = tvec[n-1-k];
    return e;
  endfunction

  // T[i][j] = v_{j-i} for j >= i, 0 below the diagonal.
  function automatic mat_t t_matrix(int unsigned n, vec_t tvec);
    mat_t m;
    vec_t e;
    m = '0;
    e = t_elems(n, tvec);
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned j = i; j < n; j++)
        m[i][j] = e[j-i];
    return m;
  endfunction

  // T^-1 is again upper-triangular Toeplitz: its elements w satisfy
  // w * V = 1 as power series over GF(2), so w_0 = 1 and
  // w_k = sum_{i=1..k} v_i * w_{k-i}.
  function automatic mat_t t_inverse(int unsigned n, vec_t tvec);
    mat_t m;
    vec_t e, w;
    e = t_elems(n, tvec);
    w = '0;
    w[0] = 1'b1;
    for (int unsigned k = 1; k < n; k++) begin
      logic acc;
      acc = 1'b0;
      for (int unsigned i = 1; i <= k; i++) acc ^= e[i] & w[k-i];
      w[k] = acc;
    end
    m = '0;
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned j = i; j < n; j++)
        m[i][j] = w[j-i];
    return m;
  endfunction

  // Product of two matrices: (rows x inner) * (inner x cols).
  function automatic mat_t mat_mul(mat_t a, mat_t b, int unsigned rows,
                                   int unsigned inner, int unsigned cols);
    mat_t m;
    m = '0;
    for (int unsigned i = 0; i < rows; i++)
      for (int unsigned j = 0; j < cols; j++) begin
        logic acc;
        acc = 1'b0;
        for (int unsigned k = 0; k < inner; k++) acc ^= a[i][k] & b[k][j];
        m[i][j] = acc;
      end
    return m;
  endfunction

  // Bv (n x v): column j is A^(v-1-j)*B = A^(v-j)*e_0, since B = A*e_0.
  function automatic mat_t bv_matrix(int unsigned n, int unsigned v, vec_t poly);
    mat_t m;
    vec_t col;
    m   = '0;
    col = '0;
    col[0] = 1'b1;
    for (int unsigned p = 1; p <= v; p++) begin
      col = lfsr_step(col, n, poly);          // col = A^p * e_0
      for (int unsigned i = 0; i < n; i++) m[i][v-p] = col[i];
    end
    return m;
  endfunction

  // A^v * T, column by column: each column of T stepped v times.
  function automatic mat_t av_t_matrix(int unsigned n, int unsigned v, vec_t poly,
                                       vec_t tvec);
    mat_t m, t;
    vec_t col;
    t = t_matrix(n, tvec);
    m = '0;
    for (int unsigned j = 0; j < n; j++) begin
      col = '0;
      for (int unsigned i = 0; i < n; i++) col[i] = t[i][j];
      for (int unsigned p = 0; p < v; p++) col = lfsr_step(col, n, poly);
      for (int unsigned i = 0; i < n; i++) m[i][j] = col[i];
    end
    return m;
  endfunction

  // AvT = T^-1 * A^v * T  (n x n).
  function automatic mat_t avt_matrix(int unsigned n, int unsigned v, vec_t poly,
                                      vec_t tvec);
    return mat_mul(t_inverse(n, tvec), av_t_matrix(n, v, poly, tvec), n, n, n);
  endfunction

  // BvT = T^-1 * Bv  (n x v).
  function automatic mat_t bvt_matrix(int unsigned n, int unsigned v, vec_t poly,
                                      vec_t tvec);
    return mat_mul(t_inverse(n, tvec), bv_matrix(n, v, poly), n, n, v);
  endfunction

  // Number of ones in the rows x cols corner of a matrix (hardware cost measure).
  function automatic int unsigned mat_ones(mat_t m, int unsigned rows, int unsigned cols);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < rows; i++)
      for (int unsigned j = 0; j < cols; j++)
        c += int'(m[i][j]);
    return c;
  endfunction

  // Two-input XOR gates without any sharing: a row with k ones needs k-1.
  function automatic int unsigned mat_xor_unshared(mat_t m, int unsigned rows,
                                                   int unsigned cols);
    int unsigned c, r;
    c = 0;
    for (int unsigned i = 0; i < rows; i++) begin
      r = 0;
      for (int unsigned j = 0; j < cols; j++) r += int'(m[i][j]);
      if (r > 1) c += r - 1;
    end
    return c;
  endfunction

endpackage
