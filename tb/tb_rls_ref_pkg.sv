// tb_rls_ref_pkg: floating-point reference arithmetic for the RLS
// testbenches: fixed-point conversion and a least-squares solve by normal
// equations with Gaussian elimination (partial pivoting), for orders up to
// MAXP. Everything here uses `real`, independently of the fixed-point RTL.
package tb_rls_ref_pkg;
  import rls_pkg::*;

  localparam int MAXP = 8;

  typedef real vec_t [MAXP];
  typedef real mat_t [MAXP][MAXP];

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(2.0 ** FX_F);
  endfunction

  function automatic fx_t r2fx(real v);
    return fx_t'($rtoi(v * (2.0 ** FX_F)));
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Solve A w = b (p x p), A symmetric positive definite in practice.
  function automatic vec_t ls_solve(mat_t a_in, vec_t b_in, int p);
    mat_t a = a_in;
    vec_t b = b_in;
    vec_t w;
    for (int k = 0; k < p; k++) begin
      int  piv = k;
      real t;
      for (int i = k + 1; i < p; i++) if (rabs(a[i][k]) > rabs(a[piv][k])) piv = i;
      for (int j = 0; j < p; j++) begin t = a[k][j]; a[k][j] = a[piv][j]; a[piv][j] = t; end
      t = b[k]; b[k] = b[piv]; b[piv] = t;
      for (int i = k + 1; i < p; i++) begin
        real f = a[i][k] / a[k][k];
        for (int j = k; j < p; j++) a[i][j] -= f * a[k][j];
        b[i] -= f * b[k];
      end
    end
    for (int k = p - 1; k >= 0; k--) begin
      real acc = b[k];
      for (int j = k + 1; j < p; j++) acc -= a[k][j] * w[j];
      w[k] = acc / a[k][k];
    end
    for (int k = p; k < MAXP; k++) w[k] = 0.0;
    return w;
  endfunction

endpackage
