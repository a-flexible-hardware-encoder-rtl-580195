// Reference model for the encoder testbenches.
//
// Generates random sparse matrices in the table format of the encoder
// ({end_row, column}, 1-based columns, column 0 for an empty row, the
// diagonal as the last entry of every row of a lower-triangular matrix) and
// computes products, forward substitutions and whole encodings in plain
// software form, independently of the RTL.
package ldpc_ref_pkg;

  typedef struct {
    int unsigned col;   // 1-based column, 0 = empty row
    bit          e;     // end of row
  } ent_t;

  typedef ent_t mat_t [$];
  typedef bit   vec_t [];

  // Random sparse matrix with `rows` rows and exactly `total` stored entries
  // (total >= rows). lower = 1 gives a unit lower-triangular square matrix.
  // allow_empty lets rows with a single entry become empty rows.
  function automatic mat_t gen_sparse(int unsigned rows, int unsigned cols,
                                      int unsigned total, bit lower,
                                      bit allow_empty);
    mat_t        m;
    int unsigned cnt [];
    int unsigned extra, r;
    cnt = new[rows];
    foreach (cnt[i]) cnt[i] = 1;
    extra = (total > rows) ? total - rows : 0;
    while (extra > 0 && rows > 0) begin
      r = $urandom_range(rows - 1);
      if (lower && r == 0) begin
        if (rows == 1) break;
        continue;
      end
      cnt[r]++;
      extra--;
    end
    for (int unsigned i = 0; i < rows; i++) begin
      if (lower) begin
        for (int unsigned j = 1; j < cnt[i]; j++)
          m.push_back('{col: $urandom_range(i, 1), e: 1'b0});
        m.push_back('{col: i + 1, e: 1'b1});
      end else if (cnt[i] == 1 && (cols == 0 || (allow_empty && $urandom_range(7) == 0))) begin
        m.push_back('{col: 0, e: 1'b1});
      end else begin
        for (int unsigned j = 0; j < cnt[i]; j++)
          m.push_back('{col: $urandom_range(cols, 1), e: (j == cnt[i] - 1)});
      end
    end
    return m;
  endfunction

  function automatic vec_t rand_vec(int unsigned len);
    vec_t v = new[len];
    foreach (v[i]) v[i] = 1'($urandom);
    return v;
  endfunction

  // z = X y for a matrix given in table format.
  function automatic vec_t mvm(mat_t x, vec_t y, int unsigned rows);
    vec_t        z = new[rows];
    int unsigned r = 0;
    bit          acc = 0;
    foreach (x[i]) begin
      if (x[i].col != 0) acc ^= y[x[i].col - 1];
      if (x[i].e) begin
        z[r] = acc;
        acc  = 0;
        r++;
      end
    end
    return z;
  endfunction

  // Solve X z = y for unit lower-triangular X (diagonal stored last in a row).
  function automatic vec_t fsub(mat_t x, vec_t y, int unsigned rows);
    vec_t        z = new[rows];
    int unsigned r = 0;
    bit          acc = 0;
    foreach (x[i]) begin
      if (x[i].e) begin
        z[r] = acc ^ y[r];
        acc  = 0;
        r++;
      end else if (x[i].col != 0) begin
        acc ^= z[x[i].col - 1];
      end
    end
    return z;
  endfunction

  function automatic vec_t vadd(vec_t a, vec_t b);
    vec_t z = new[a.size()];
    foreach (z[i]) z[i] = a[i] ^ b[i];
    return z;
  endfunction

  // Random permutation of 0..n-1.

  typedef int unsigned perm_t [];

  function automatic perm_t rand_perm(int unsigned n);
    perm_t p = new[n];
    int unsigned j, t;
    foreach (p[i]) p[i] = i;
    for (int i = int'(n) - 1; i > 0; i--) begin
      j    = $urandom_range(i);
      t    = p[i];
      p[i] = p[j];
      p[j] = t;
    end
    return p;
  endfunction

  typedef bit dense_t [][];

  // Dense g x g copy of a table with g columns.
  function automatic dense_t to_dense(mat_t x, int unsigned g);
    dense_t      d = new[g];
    int unsigned r = 0;
    foreach (d[i]) d[i] = new[g];
    foreach (x[i]) begin
      if (x[i].col != 0) d[r][x[i].col - 1] ^= 1'b1;
      if (x[i].e) r++;
    end
    return d;
  endfunction

  // Inverse over GF(2) by Gauss-Jordan elimination; ok = 0 if singular.
  function automatic dense_t inv_gf2(dense_t a, output bit ok);
    int unsigned g = a.size();
    dense_t      m = new[g], v = new[g];
    bit          t [];
    ok = 1;
    foreach (m[i]) begin
      m[i] = new[g];
      v[i] = new[g];
      foreach (m[i][j]) begin
        m[i][j] = a[i][j];
        v[i][j] = (i == j);
      end
    end
    for (int c = 0; c < int'(g); c++) begin
      int p = -1;
      for (int r = c; r < int'(g); r++) if (m[r][c] && p < 0) p = r;
      if (p < 0) begin
        ok = 0;
        return v;
      end
      t = m[p]; m[p] = m[c]; m[c] = t;
      t = v[p]; v[p] = v[c]; v[c] = t;
      for (int r = 0; r < int'(g); r++)
        if (r != c && m[r][c])
          for (int j = 0; j < int'(g); j++) begin
            m[r][j] ^= m[c][j];
            v[r][j] ^= v[c][j];
          end
    end
    return v;
  endfunction

  // A complete code description in table form.
  typedef struct {
    int unsigned k, g, mg;
    mat_t        a, b, t, c, e, f;
    perm_t       perm;
  } code_t;

  function automatic code_t gen_code(int unsigned k, int unsigned g, int unsigned mg,
                                     int unsigned ea, int unsigned eb, int unsigned et,
                                     int unsigned ec, int unsigned ee, int unsigned ef,
                                     bit allow_empty);
    code_t c;
    c.k    = k;
    c.g    = g;
    c.mg   = mg;
    c.a    = gen_sparse(mg, k, ea, 0, allow_empty);
    c.b    = gen_sparse(mg, g, eb, 0, allow_empty);
    c.t    = gen_sparse(mg, mg, et, 1, 0);
    c.c    = gen_sparse(g, k, ec, 0, allow_empty);
    c.e    = gen_sparse(g, mg, ee, 0, allow_empty);
    // the F table must be invertible for the code to exist
    for (int tries = 0; tries < 1000; tries++) begin
      bit ok;
      dense_t d;
      c.f = gen_sparse(g, g, ef, 0, 0);
      d   = inv_gf2(to_dense(c.f, g), ok);
      if (ok) break;
    end
    c.perm = rand_perm(k + g + mg);
    return c;
  endfunction

  // p1 = F (E T^-1 A s + C s); p2 = T^-1 (A s + B p1); returns the final
  // codeword, whose element j is element perm[j] of (s, p1, p2).
  function automatic vec_t encode(code_t c, vec_t s, output vec_t p1, output vec_t p2);
    vec_t as_v, tas, etas, cs, x, cw;
    int unsigned n = c.k + c.g + c.mg;
    as_v = mvm(c.a, s, c.mg);
    tas  = fsub(c.t, as_v, c.mg);
    etas = mvm(c.e, tas, c.g);
    cs   = mvm(c.c, s, c.g);
    p1   = mvm(c.f, vadd(etas, cs), c.g);
    p2   = fsub(c.t, vadd(as_v, mvm(c.b, p1, c.mg)), c.mg);
    x    = new[n];
    foreach (s[i])  x[i] = s[i];
    foreach (p1[i]) x[c.k + i] = p1[i];
    foreach (p2[i]) x[c.k + c.g + i] = p2[i];
    cw = new[n];
    foreach (cw[j]) cw[j] = x[c.perm[j]];
    return cw;
  endfunction

  // Number of rows of [A B T] x that are not zero, x = (s, p1, p2): a check
  // that uses T as a plain product and so does not rely on substitution.
  function automatic int unsigned abt_syndrome(code_t c, vec_t s, vec_t p1, vec_t p2);
    vec_t        r;
    int unsigned bad = 0;
    r = vadd(vadd(mvm(c.a, s, c.mg), mvm(c.b, p1, c.mg)), mvm(c.t, p2, c.mg));
    foreach (r[i]) if (r[i]) bad++;
    return bad;
  endfunction

  // Number of rows of [C D E] x that are not zero, with D rebuilt from the
  // tables as D = F_table^-1 + E T^-1 B: the second block row of H.
  function automatic int unsigned cde_syndrome(code_t c, vec_t s, vec_t p1, vec_t p2);
    dense_t      finv, d;
    vec_t        r, ecol, u, dp1;
    bit          ok;
    int unsigned bad = 0;
    finv = inv_gf2(to_dense(c.f, c.g), ok);
    d = new[c.g];
    foreach (d[i]) d[i] = new[c.g];
    for (int unsigned col = 0; col < c.g; col++) begin
      ecol = new[c.g];
      ecol[col] = 1'b1;
      u = mvm(c.e, fsub(c.t, mvm(c.b, ecol, c.mg), c.mg), c.g);
      for (int unsigned i = 0; i < c.g; i++) d[i][col] = finv[i][col] ^ u[i];
    end
    dp1 = new[c.g];
    foreach (dp1[i]) foreach (p1[j]) dp1[i] ^= d[i][j] & p1[j];
    r = vadd(vadd(mvm(c.c, s, c.g), dp1), mvm(c.e, p2, c.g));
    foreach (r[i]) if (r[i]) bad++;
    if (!ok) bad++;
    return bad;
  endfunction

endpackage
