// dpd_fit_pkg: least-squares polynomial fit used by the testbenches to play the part of the
// off-chip foreground calibration: given measured points (x, tw), it returns the
// coefficients a0..a_order of tw = sum a_i x^i that minimise the squared error (normal
// equations solved by Gauss-Jordan elimination with partial pivoting); higher
// coefficients are zero.
package dpd_fit_pkg;

  localparam int MAXN = 9;

  function automatic void fit(input real xs [$], input real ys [$], input int order,
                              output real a [MAXN]);
    real m [MAXN][MAXN+1];
    real p, t, mag_r, mag_p;
    int n, piv;
    n = order + 1;
    for (int r = 0; r < MAXN; r++)
      for (int c = 0; c <= MAXN; c++) m[r][c] = 0.0;
    foreach (xs[k]) begin
      for (int r = 0; r < n; r++) begin
        for (int c = 0; c < n; c++) m[r][c] += (xs[k] ** r) * (xs[k] ** c);
        m[r][n] += (xs[k] ** r) * ys[k];
      end
    end
    for (int c = 0; c < n; c++) begin
      piv = c;
      for (int r = c + 1; r < n; r++) begin
        mag_r = (m[r][c] < 0.0) ? -m[r][c] : m[r][c];
        mag_p = (m[piv][c] < 0.0) ? -m[piv][c] : m[piv][c];
        if (mag_r > mag_p) piv = r;
      end
      for (int k = 0; k <= n; k++) begin t = m[c][k]; m[c][k] = m[piv][k]; m[piv][k] = t; end
      for (int r = 0; r < n; r++) if (r != c) begin
        p = m[r][c] / m[c][c];
        for (int k = c; k <= n; k++) m[r][k] -= p * m[c][k];
      end
    end
    for (int i = 0; i < MAXN; i++) a[i] = (i < n) ? m[i][n] / m[i][i] : 0.0;
  endfunction

endpackage
