// tb_rls_pkg: helpers shared by the testbenches of the RLS array: conversion
// between the fixed-point word and real numbers, tolerance checks, a
// uniform random number source and a complex least-squares solver used as
// the independent reference for the estimated weights.
package tb_rls_pkg;
  import rls_pkg::*;

  localparam int MAXN   = 16;
  localparam int MAXROW = 64;

  typedef struct {
    real re;
    real im;
  } rc_t;

  function automatic fix_t r2f(real r);
    return fix_t'($rtoi(r * (2.0 ** FRAC_W) + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real f2r(fix_t f);
    return $itor(f) / (2.0 ** FRAC_W);
  endfunction

  function automatic cplx_t rc2c(rc_t a);
    cplx_t c;
    c.re = r2f(a.re);
    c.im = r2f(a.im);
    return c;
  endfunction

  function automatic rc_t c2rc(cplx_t c);
    rc_t a;
    a.re = f2r(c.re);
    a.im = f2r(c.im);
    return a;
  endfunction

  function automatic rc_t rc(real re, real im);
    rc_t a;
    a.re = re;
    a.im = im;
    return a;
  endfunction

  function automatic rc_t rcmul(rc_t a, rc_t b);
    return rc(a.re*b.re - a.im*b.im, a.re*b.im + a.im*b.re);
  endfunction

  function automatic rc_t rcconj(rc_t a);
    return rc(a.re, -a.im);
  endfunction

  function automatic rc_t rcadd(rc_t a, rc_t b);
    return rc(a.re + b.re, a.im + b.im);
  endfunction

  function automatic rc_t rcsub(rc_t a, rc_t b);
    return rc(a.re - b.re, a.im - b.im);
  endfunction

  function automatic rc_t rcscale(real s, rc_t a);
    return rc(s * a.re, s * a.im);
  endfunction

  function automatic rc_t rcdiv(rc_t a, rc_t b);
    real m;
    m = b.re*b.re + b.im*b.im;
    return rc((a.re*b.re + a.im*b.im) / m, (a.im*b.re - a.re*b.im) / m);
  endfunction

  function automatic real rabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic bit near(real a, real b, real tol);
    return rabs(a - b) <= tol;
  endfunction

  function automatic bit cnear(rc_t a, rc_t b, real tol);
    return near(a.re, b.re, tol) && near(a.im, b.im, tol);
  endfunction

  // Uniform in [lo, hi).
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * ($itor($urandom) / 4294967296.0);
  endfunction

  // Solve A x = b for n complex unknowns (Gaussian elimination with partial
  // pivoting). A and b are overwritten.
  function automatic void csolve(int n, ref rc_t A[MAXN][MAXN], ref rc_t b[MAXN],
                                 ref rc_t x[MAXN]);
    for (int k = 0; k < n; k++) begin
      int  p;
      real best;
      p = k;
      best = 0.0;
      for (int i = k; i < n; i++) begin
        real m;
        m = A[i][k].re*A[i][k].re + A[i][k].im*A[i][k].im;
        if (m > best) begin
          best = m;
          p = i;
        end
      end
      if (p != k) begin
        rc_t t;
        for (int j = 0; j < n; j++) begin
          t = A[k][j]; A[k][j] = A[p][j]; A[p][j] = t;
        end
        t = b[k]; b[k] = b[p]; b[p] = t;
      end
      for (int i = k + 1; i < n; i++) begin
        rc_t f;
        f = rcdiv(A[i][k], A[k][k]);
        for (int j = k; j < n; j++) A[i][j] = rcsub(A[i][j], rcmul(f, A[k][j]));
        b[i] = rcsub(b[i], rcmul(f, b[k]));
      end
    end
    for (int i = n - 1; i >= 0; i--) begin
      rc_t s;
      s = b[i];
      for (int j = i + 1; j < n; j++) s = rcsub(s, rcmul(A[i][j], x[j]));
      x[i] = rcdiv(s, A[i][i]);
    end
  endfunction

  // Exponentially weighted least squares: find x minimising
  //   sum_k lambda^(nrow-1-k) |d_k - sum_j x_j u_kj|^2
  // over the first n columns of nrow rows.
  function automatic void ls_ref(int n, int nrow, real lambda,
                                 ref rc_t U[MAXROW][MAXN], ref rc_t D[MAXROW],
                                 ref rc_t x[MAXN]);
    rc_t A[MAXN][MAXN];
    rc_t b[MAXN];
    for (int i = 0; i < MAXN; i++) begin
      b[i] = rc(0.0, 0.0);
      for (int j = 0; j < MAXN; j++) A[i][j] = rc(0.0, 0.0);
    end
    for (int k = 0; k < nrow; k++) begin
      real g;
      g = lambda ** (nrow - 1 - k);
      for (int i = 0; i < n; i++) begin
        for (int j = 0; j < n; j++)
          A[i][j] = rcadd(A[i][j], rcscale(g, rcmul(rcconj(U[k][i]), U[k][j])));
        b[i] = rcadd(b[i], rcscale(g, rcmul(rcconj(U[k][i]), D[k])));
      end
    end
    csolve(n, A, b, x);
  endfunction

endpackage
