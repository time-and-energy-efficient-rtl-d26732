// Reference model for the testbenches: the block LU decomposition computed
// element by element in plain loops, with the same 16-bit fixed-point
// conventions as the hardware (Q8.8, products truncated by an arithmetic
// shift, wrap-around sums, reciprocal Round(2^15/idx) of |u| >> 6) and the
// same order of accumulation, so results must match bit for bit.
//
// The matrix lives in the dynamic array m (row-major, n*n words); block_lu()
// factors it in place: strictly lower part = L, the rest = U.
package lu_ref_pkg;

  typedef logic signed [15:0] w16;

  w16 m [];

  function automatic w16 fmul(w16 a, w16 b);
    logic signed [31:0] p;
    p = 32'(a) * 32'(b);
    return w16'(p >>> 8);
  endfunction

  function automatic w16 frecip(w16 u);
    int mag, idx, v;
    mag = (u < 0) ? -int'(u) : int'(u);
    idx = mag / 64;
    if (idx == 0) v = 32767;
    else begin
      v = (32768 + idx / 2) / idx;
      if (v > 32767) v = 32767;
    end
    return (u < 0) ? w16'(-v) : w16'(v);
  endfunction

  function automatic w16 fnorm(w16 d, w16 r);
    logic signed [31:0] p;
    p = 32'(d) * 32'(r);
    return w16'(p >>> 13);
  endfunction

  function automatic int ix(int n, int r, int c);
    return r * n + c;
  endfunction

  // In-place block LU of the n x n matrix m with block size b.
  function automatic void block_lu(int n, int b);
    w16 rr [];
    rr = new[b];
    for (int kk = 0; kk < n / b; kk++) begin
      int o = kk * b;
      int mb = n / b - 1 - kk;
      // opLU on the diagonal block
      for (int x = 0; x < b; x++)
        for (int j = 0; j < b; j++) begin
          w16 acc, d;
          acc = 0;
          for (int y = 0; y < ((x < j) ? x : j); y++)
            acc = acc + fmul(m[ix(n, o+x, o+y)], m[ix(n, o+y, o+j)]);
          d = m[ix(n, o+x, o+j)] - acc;
          if (x == j) rr[j] = frecip(d);
          m[ix(n, o+x, o+j)] = (x > j) ? fnorm(d, rr[j]) : d;
        end
      // opL on the blocks below
      for (int bi = 0; bi < mb; bi++)
        for (int x = 0; x < b; x++)
          for (int j = 0; j < b; j++) begin
            w16 acc;
            int rw = o + b*(bi+1) + x;
            acc = 0;
            for (int y = 0; y < j; y++)
              acc = acc + fmul(m[ix(n, rw, o+y)], m[ix(n, o+y, o+j)]);
            m[ix(n, rw, o+j)] = fnorm(m[ix(n, rw, o+j)] - acc, rr[j]);
          end
      // opU on the blocks to the right (forward substitution with unit L11)
      for (int bj = 0; bj < mb; bj++)
        for (int x = 0; x < b; x++)
          for (int j = 0; j < b; j++) begin
            w16 acc;
            int cl = o + b*(bj+1) + x;
            acc = 0;
            for (int y = 0; y < j; y++)
              acc = acc + fmul(m[ix(n, o+y, cl)], m[ix(n, o+j, o+y)]);
            m[ix(n, o+j, cl)] = m[ix(n, o+j, cl)] - acc;
          end
      // trailing update
      for (int r = o + b; r < n; r++)
        for (int c = o + b; c < n; c++) begin
          w16 acc;
          acc = 0;
          for (int k = 0; k < b; k++)
            acc = acc + fmul(m[ix(n, r, o+k)], m[ix(n, o+k, c)]);
          m[ix(n, r, c)] = m[ix(n, r, c)] - acc;
        end
    end
  endfunction

  // Test matrix: diagonal around dg (Q8.8), off-diagonal elements uniformly
  // in [-off, off]; diagonally heavy so no pivot gets small.
  function automatic void make_matrix(int n, int dg, int off);
    m = new[n*n];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int v;
        v = int'($urandom_range(2*off)) - off;
        if (r == c) v = dg + int'($urandom_range(dg / 4));
        m[ix(n, r, c)] = w16'(v);
      end
  endfunction

endpackage
