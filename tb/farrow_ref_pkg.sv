// farrow_ref_pkg: floating-point reference for the Farrow testbenches.
//
// Recomputes the Farrow coefficients from their definition in real arithmetic,
// independently of the integer code in the design:
//   Lagrange: expand prod_{k!=n} (d + 4 - k) / (n - k) as a polynomial in d.
//   LSP:      continuous least-squares cubic fit of the Lagrange taps over
//             d in [0, 1], using the normal equations with the inverse 4x4
//             Hilbert matrix.
// and gives the quantised value round(c * 2^frac) and a floating-point model of
// the whole filter.
package farrow_ref_pkg;

  // Coefficient of d^m of the Lagrange tap n (ten taps, integer delay 4).
  function automatic real lagrange_c(int m, int n);
    real p [11];
    real q [11];
    real den = 1.0;
    for (int i = 0; i < 11; i++) p[i] = 0.0;
    p[0] = 1.0;
    for (int k = 0; k < 10; k++) begin
      if (k == n) continue;
      for (int i = 0; i < 11; i++) q[i] = 0.0;
      for (int i = 0; i < 10; i++) begin
        q[i]   = q[i] + p[i] * real'(4 - k);
        q[i+1] = q[i+1] + p[i];
      end
      p = q;
      den = den * real'(n - k);
    end
    return p[m] / den;
  endfunction

  function automatic real lsp_c(int i, int n);
    real hinv [4][4] = '{'{16.0, -120.0, 240.0, -140.0},
                         '{-120.0, 1200.0, -2700.0, 1680.0},
                         '{240.0, -2700.0, 6480.0, -4200.0},
                         '{-140.0, 1680.0, -4200.0, 2800.0}};
    real b [4];
    real c = 0.0;
    for (int k = 0; k < 4; k++) begin
      b[k] = 0.0;
      for (int j = 0; j < 10; j++) b[k] = b[k] + lagrange_c(j, n) / real'(k + j + 1);
    end
    for (int k = 0; k < 4; k++) c = c + hinv[i][k] * b[k];
    return c;
  endfunction

  // is_lsp = 0: Lagrange set (Q.28), 1: least-squares cubic set (Q.10)
  function automatic int nbranch(bit is_lsp);
    return is_lsp ? 4 : 10;
  endfunction

  function automatic int cfrac(bit is_lsp);
    return is_lsp ? 10 : 28;
  endfunction

  function automatic longint coef_q(bit is_lsp, int m, int n);
    real c = is_lsp ? lsp_c(m, n) : lagrange_c(m, n);
    real s = c * (2.0 ** cfrac(is_lsp));
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  // Quantised coefficient tables, filled once by build_tables().
  real cq [2][10][10];

  function automatic void build_tables();
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 10; m++)
        for (int n = 0; n < 10; n++)
          cq[s][m][n] = (m < nbranch(s[0])) ? real'(coef_q(s[0], m, n)) : 0.0;
  endfunction

  // Filter output (in input units) with the quantised coefficients and exact
  // arithmetic otherwise. x[n] is x(k-n). Needs build_tables() first.
  function automatic real farrow_out(bit is_lsp, real d, real x [10]);
    real y = 0.0;
    real dm = 1.0;
    for (int m = 0; m < nbranch(is_lsp); m++) begin
      real v = 0.0;
      for (int n = 0; n < 10; n++) v = v + cq[is_lsp][m][n] * x[n];
      y = y + v * dm;
      dm = dm * d;
    end
    return y / (2.0 ** cfrac(is_lsp));
  endfunction

  // Ideal Lagrange fractional-delay filter output for total delay 4 + d.
  function automatic real lagrange_out(real d, real x [10]);
    real y = 0.0;
    for (int n = 0; n < 10; n++) begin
      real h = 1.0;
      for (int k = 0; k < 10; k++)
        if (k != n) h = h * (4.0 + d - real'(k)) / real'(n - k);
      y = y + h * x[n];
    end
    return y;
  endfunction

endpackage
