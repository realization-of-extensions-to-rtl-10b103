// faddeev_tb_pkg: testbench helpers for the Faddeev array.
//
// Conversions between real numbers and the fixed-point words of
// faddeev_pkg, and a reference model of Faddeev's algorithm in double
// precision: for a matrix of nr x nc entries (row-major in a dynamic array)
// whose top-left n x n block is A, the reference result of every entry
// (r, c) with r, c >= n is  M[r][c] - M[r][0:n-1] * A^-1 * M[0:n-1][c],
// i.e. D + C A^-1 B when the lower-left block holds -C. A^-1 * (top rows)
// is found by Gaussian elimination with partial pivoting, independently of
// the neighbour-pivoting scheme used by the hardware.
package faddeev_tb_pkg;
  import faddeev_pkg::*;

  function automatic fx_t to_fx(real v);
    return fx_t'($rtoi(v * real'(1 << FRAC_W) + ((v < 0.0) ? -0.5 : 0.5)));
  endfunction

  function automatic real from_fx(fx_t v);
    return real'(v) / real'(1 << FRAC_W);
  endfunction

  // smallest absolute pivot met by partial-pivoting elimination of A
  // (a conditioning guard for randomly drawn matrices)
  function automatic real min_pivot(int n, ref real mb[], input int nc);
    real a[];
    real best, t, f, mp;
    int  p;
    a = new[n*n];
    for (int r = 0; r < n; r++) for (int c = 0; c < n; c++) a[r*n+c] = mb[r*nc+c];
    mp = 1.0e30;
    for (int k = 0; k < n; k++) begin
      p = k; best = (a[k*n+k] < 0) ? -a[k*n+k] : a[k*n+k];
      for (int r = k+1; r < n; r++) begin
        t = (a[r*n+k] < 0) ? -a[r*n+k] : a[r*n+k];
        if (t > best) begin best = t; p = r; end
      end
      if (best < mp) mp = best;
      if (best == 0.0) return 0.0;
      for (int c = 0; c < n; c++) begin t = a[k*n+c]; a[k*n+c] = a[p*n+c]; a[p*n+c] = t; end
      for (int r = k+1; r < n; r++) begin
        f = a[r*n+k] / a[k*n+k];
        for (int c = k; c < n; c++) a[r*n+c] -= f * a[k*n+c];
      end
    end
    return mp;
  endfunction

  // expected results: ex[r*nc+c] for r >= n, c >= n
  function automatic void faddeev_ref(int n, int nr, int nc, ref real mb[], ref real ex[]);
    real a[];   // augmented [A | top-right], n x nc
    real t, f, best;
    int  p;
    a  = new[n*nc];
    ex = new[nr*nc];
    for (int r = 0; r < n; r++) for (int c = 0; c < nc; c++) a[r*nc+c] = mb[r*nc+c];
    // forward elimination with partial pivoting
    for (int k = 0; k < n; k++) begin
      p = k; best = (a[k*nc+k] < 0) ? -a[k*nc+k] : a[k*nc+k];
      for (int r = k+1; r < n; r++) begin
        t = (a[r*nc+k] < 0) ? -a[r*nc+k] : a[r*nc+k];
        if (t > best) begin best = t; p = r; end
      end
      for (int c = 0; c < nc; c++) begin t = a[k*nc+c]; a[k*nc+c] = a[p*nc+c]; a[p*nc+c] = t; end
      for (int r = k+1; r < n; r++) begin
        f = a[r*nc+k] / a[k*nc+k];
        for (int c = k; c < nc; c++) a[r*nc+c] -= f * a[k*nc+c];
      end
    end
    // back substitution: a[0:n-1][n:nc-1] becomes A^-1 * top-right
    for (int k = n-1; k >= 0; k--) begin
      for (int c = n; c < nc; c++) begin
        t = a[k*nc+c];
        for (int j = k+1; j < n; j++) t -= a[k*nc+j] * a[j*nc+c];
        a[k*nc+c] = t / a[k*nc+k];
      end
    end
    for (int r = n; r < nr; r++)
      for (int c = n; c < nc; c++) begin
        t = mb[r*nc+c];
        for (int j = 0; j < n; j++) t -= mb[r*nc+j] * a[j*nc+c];
        ex[r*nc+c] = t;
      end
  endfunction

endpackage
