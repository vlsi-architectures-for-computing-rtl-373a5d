// gf2m_nb_pkg -- constants and elaboration-time functions for normal-basis
// arithmetic in GF(2^m).
//
// An element of GF(2^m) is held as a vector b with bit i the coefficient of
// alpha^(2^i), where alpha is a root of the field polynomial POLY and
// {alpha, alpha^2, alpha^4, ..., alpha^(2^(m-1))} is a normal basis.  In this
// representation squaring is a one-place rotation and the element 1 is all
// ones.
//
// The Massey-Omura product function f gives the top product component
//     d_{m-1} = XOR over (i,j) with lambda[i][j]=1 of b_i & c_j
// and every other component is the same f applied to rotated operands.  The
// matrix lambda depends only on m and POLY.  The functions here compute it
// once, at elaboration: the basis elements alpha^(2^i) are formed in the
// polynomial basis by repeated squaring modulo POLY, the change-of-basis
// matrix is inverted by Gauss-Jordan elimination over GF(2), and each
// product alpha^(2^i) * alpha^(2^j) is converted back to the normal basis;
// its coordinate m-1 is lambda[i][j].  For m = 4 and POLY = x^4 + x^3 + 1
// this yields the nine terms b2c2, b3c2, b2c3, b3c1, b1c3, b3c0, b0c3, b1c0
// and b0c1.
//
// Nothing here is hardware; the functions only size and wire the modules.
package gf2m_nb_pkg;

  // Largest field degree the elaboration functions handle.
  localparam int unsigned MAX_M = 64;

  // Default field: m = 4, P(x) = x^4 + x^3 + 1 (bit k = coefficient of x^k).
  localparam int unsigned    DEFAULT_M    = 4;
  localparam logic [MAX_M:0] DEFAULT_POLY = (MAX_M + 1)'('b11001);

  typedef logic [MAX_M-1:0]            vec_t;
  typedef logic [MAX_M-1:0][MAX_M-1:0] mat_t;  // [row][column]

  // a * b mod p in the polynomial basis, degree m.
  function automatic vec_t poly_mulmod(vec_t a, vec_t b, logic [MAX_M:0] p, int unsigned m);
    logic [2*MAX_M-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < m; i++)
      if (b[i]) r = r ^ ((2*MAX_M)'(a) << i);
    for (int i = 2 * int'(m) - 2; i >= int'(m); i--)
      if (r[i]) r = r ^ ((2*MAX_M)'(p) << (i - int'(m)));
    return vec_t'(r);
  endfunction

  // Column i of the result is alpha^(2^i) in the polynomial basis (alpha = x).
  function automatic mat_t nb_basis(int unsigned m, logic [MAX_M:0] p);
    mat_t a;
    vec_t x;
    a = '0;
    x = vec_t'(2);
    for (int unsigned i = 0; i < m; i++) begin
      for (int unsigned r = 0; r < m; r++) a[r][i] = x[r];
      x = poly_mulmod(x, x, p, m);
    end
    return a;
  endfunction

  // 1 when the roots alpha^(2^i) are linearly independent (a normal basis).
  function automatic bit nb_is_normal(int unsigned m, logic [MAX_M:0] p);
    mat_t a;
    int   rank;
    a    = nb_basis(m, p);
    rank = 0;
    for (int unsigned col = 0; col < m; col++) begin
      int piv;
      piv = -1;
      for (int r = rank; r < int'(m); r++)
        if (piv < 0 && a[r][col]) piv = r;
      if (piv >= 0) begin
        for (int unsigned c = 0; c < MAX_M; c++) begin
          logic t;
          t = a[piv][c]; a[piv][c] = a[rank][c]; a[rank][c] = t;
        end
        for (int r = 0; r < int'(m); r++)
          if (r != rank && a[r][col])
            for (int unsigned c = 0; c < MAX_M; c++) a[r][c] = a[r][c] ^ a[rank][c];
        rank++;
      end
    end
    return rank == int'(m);
  endfunction

  // Inverse over GF(2) of the change-of-basis matrix: maps polynomial-basis
  // coordinates to normal-basis coordinates.
  function automatic mat_t nb_inverse_basis(int unsigned m, logic [MAX_M:0] p);
    mat_t a, inv;
    a   = nb_basis(m, p);
    inv = '0;
    for (int unsigned r = 0; r < m; r++) inv[r][r] = 1'b1;
    for (int unsigned col = 0; col < m; col++) begin
      int piv;
      piv = -1;
      for (int r = int'(col); r < int'(m); r++)
        if (piv < 0 && a[r][col]) piv = r;
      if (piv >= 0) begin
        for (int unsigned c = 0; c < MAX_M; c++) begin
          logic t;
          t = a[piv][c];   a[piv][c]   = a[col][c];   a[col][c]   = t;
          t = inv[piv][c]; inv[piv][c] = inv[col][c]; inv[col][c] = t;
        end
        for (int unsigned r = 0; r < m; r++)
          if (r != col && a[r][col])
            for (int unsigned c = 0; c < MAX_M; c++) begin
              a[r][c]   = a[r][c] ^ a[col][c];
              inv[r][c] = inv[r][c] ^ inv[col][c];
            end
      end
    end
    return inv;
  endfunction

  // lambda[i][j] = 1 when the term b_i c_j appears in f.
  function automatic mat_t nb_lambda(int unsigned m, logic [MAX_M:0] p);
    mat_t a, inv, lam;
    vec_t ni, nj, prod;
    a   = nb_basis(m, p);
    inv = nb_inverse_basis(m, p);
    lam = '0;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < m; j++) begin
        ni = '0;
        nj = '0;
        for (int unsigned r = 0; r < m; r++) begin
          ni[r] = a[r][i];
          nj[r] = a[r][j];
        end
        prod = poly_mulmod(ni, nj, p, m);
        // coordinate m-1 of prod in the normal basis: row m-1 of inv times prod
        lam[i][j] = 1'b0;
        for (int unsigned r = 0; r < m; r++) lam[i][j] = lam[i][j] ^ (inv[m-1][r] & prod[r]);
      end
    return lam;
  endfunction

  // Number of AND terms of f, n(0), from the matrix lambda.
  function automatic int unsigned nb_term_count(mat_t lam, int unsigned m);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < m; j++)
        n += 32'(lam[i][j]);
    return n;
  endfunction

  // Position of term (i,j) in the row-major list of the terms of f.
  function automatic int unsigned nb_term_index(mat_t lam, int unsigned m,
                                                int unsigned i, int unsigned j);
    int unsigned n;
    n = 0;
    for (int unsigned r = 0; r < m; r++)
      for (int unsigned c = 0; c < m; c++)
        if (r * m + c < i * m + j) n += 32'(lam[r][c]);
    return n;
  endfunction

  // Number of signals at level lvl of the XOR tree: n(0) = n0,
  // n(j+1) = ceil(n(j) / 2).
  function automatic int unsigned xor_level_width(int unsigned n0, int unsigned lvl);
    int unsigned n;
    n = n0;
    for (int unsigned j = 0; j < lvl; j++) n = (n + 1) / 2;
    return n;
  endfunction

  // Number of XOR levels, k = ceil(log2 n(0)).
  function automatic int unsigned xor_levels(int unsigned n0);
    int unsigned k;
    k = 0;
    while (xor_level_width(n0, k) > 1) k++;
    return k;
  endfunction

endpackage
