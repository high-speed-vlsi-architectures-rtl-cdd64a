// tb_rls_dual_state_array: end-to-end test of the sliding-window RLS
// processor at its default size (P = 4, L = 16).
//
// Rows [x^T : y] with x uniform in [-0.5, 0.5] and y = x^T w + noise are
// offered whenever the processor is ready, with random gaps. For every
// accepted row k the testbench solves the least-squares problem in floating
// point and checks:
//  * the update residual e_u1 = x_k^T w[k-L..k] - y_k (window of L+1 rows),
//    LATENCY clocks after the row was accepted;
//  * once the window is full, the downdate residual
//    e_2 = x_{k-L}^T w[k-L+1..k] - y_{k-L}, one clock after that;
//  * that no residual appears for a downdate while the window fills;
//  * at the end, R^T [R : u] against the sums of x [x^T y] over the last
//    L rows, i.e. that the array holds the factor of exactly the window.
// It also checks the rate of one row per two clocks and that no downdate
// failed.
module tb_rls_dual_state_array;
  import rls_pkg::*;
  import tb_rls_ref_pkg::*;

  localparam int unsigned P       = 4;
  localparam int unsigned L       = 16;
  localparam int          NROWS   = 120;
  localparam int          LATENCY = 2 * P + 2;
  localparam real         TOL     = 0.004;

  logic      clk = 0, rst_n, clear, in_valid, in_ready;
  fx_t       in_x [P];
  fx_t       in_y;
  logic      e_valid, dd_fail;
  rot_mode_e e_mode;
  fx_t       e_out;
  fx_t       r_mat [P][P+1];

  int checks = 0, failures = 0;

  rls_dual_state_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xs [NROWS][P];
  real ys [NROWS];

  // least-squares residual of row t on the window of rows lo..hi
  function automatic real resid(int t, int lo, int hi);
    mat_t a;
    vec_t b, w;
    real  e;
    for (int i = 0; i < MAXP; i++) begin
      b[i] = 0.0;
      for (int j = 0; j < MAXP; j++) a[i][j] = 0.0;
    end
    for (int k = lo; k <= hi; k++)
      for (int i = 0; i < P; i++) begin
        b[i] += xs[k][i] * ys[k];
        for (int j = 0; j < P; j++) a[i][j] += xs[k][i] * xs[k][j];
      end
    w = ls_solve(a, b, P);
    e = -ys[t];
    for (int i = 0; i < P; i++) e += xs[t][i] * w[i];
    return e;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected outputs, in order
  typedef struct {
    rot_mode_e mode;
    int        row;
    int        due;
  } exp_t;
  exp_t exp_q [$];
  int   accepted = 0, n_upd = 0, n_dnd = 0, max_err_ppm = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      exp_q.push_back('{mode: ROT_UPDATE, row: accepted, due: cyc + LATENCY});
      if (accepted >= L) exp_q.push_back('{mode: ROT_DOWNDATE, row: accepted, due: cyc + LATENCY + 1});
      accepted <= accepted + 1;
    end
    if (rst_n && dd_fail) begin
      failures++; $display("downdate failure reported");
    end
    if (rst_n && e_valid) begin
      exp_t x;
      real  e, got;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected residual at %0d", cyc);
      end else begin
        x = exp_q.pop_front();
        if (x.mode != e_mode || x.due != cyc) begin
          failures++;
          $display("residual of row %0d: mode %0d at %0d, expected mode %0d at %0d",
                   x.row, e_mode, cyc, x.mode, x.due);
        end
        if (x.mode == ROT_UPDATE) begin
          n_upd++;
          e = resid(x.row, (x.row >= L) ? x.row - L : 0, x.row);
        end else begin
          n_dnd++;
          e = resid(x.row - L, x.row - L + 1, x.row);
        end
        got = fx2r(e_out);
        // value checks once the window is overdetermined
        if (x.row >= 2 * P) begin
          checks++;
          if (rabs(got - e) > TOL) begin
            failures++;
            if (failures < 20) $display("row %0d mode %0d: e=%f expected %f", x.row, x.mode, got, e);
          end
          if (int'(rabs(got - e) * 1e6) > max_err_ppm) max_err_ppm = int'(rabs(got - e) * 1e6);
        end
      end
    end
  end

  initial begin
    real w_true [P];
    int  k, pairs, last_acc;
    rst_n = 0; clear = 0; in_valid = 0; in_y = '0;
    foreach (in_x[i]) in_x[i] = '0;
    foreach (w_true[i]) w_true[i] = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
    for (int n = 0; n < NROWS; n++) begin
      ys[n] = (real'($urandom_range(1000)) - 500.0) / 10000.0;
      for (int i = 0; i < P; i++) begin
        xs[n][i] = fx2r(r2fx((real'($urandom_range(1000)) - 500.0) / 1000.0));
        ys[n] += xs[n][i] * w_true[i] * 0.5;
      end
      ys[n] = fx2r(r2fx(ys[n]));
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    k = 0; pairs = 0; last_acc = -10;
    while (k < NROWS) begin
      in_valid = in_ready && ($urandom_range(5) != 0);
      if (in_valid) begin
        for (int i = 0; i < P; i++) in_x[i] = r2fx(xs[k][i]);
        in_y = r2fx(ys[k]);
      end
      @(posedge clk);
      if (in_valid) begin
        if (cyc - last_acc == 2) pairs++;
        last_acc = cyc;
        k++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4 * P + 8) @(posedge clk);
    // the factor must describe exactly the last L rows
    for (int i = 0; i < P; i++)
      for (int j = 0; j <= P; j++) begin
        real acc, ref_v;
        acc = 0.0; ref_v = 0.0;
        for (int m = 0; m < P; m++) acc += fx2r(r_mat[m][i]) * fx2r(r_mat[m][j]);
        for (int n = NROWS - L; n < NROWS; n++) ref_v += xs[n][i] * ((j < P) ? xs[n][j] : ys[n]);
        checks++;
        if (rabs(acc - ref_v) > 0.01 + 0.01 * rabs(ref_v)) begin
          failures++; $display("R^T[R:u](%0d,%0d) = %f, window sum %f", i, j, acc, ref_v);
        end
      end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d residuals missing", exp_q.size()); end
    checks++;
    if (pairs == 0) begin failures++; $display("rows never accepted back to back"); end
    checks++;
    if (n_upd != NROWS || n_dnd != NROWS - L) begin
      failures++; $display("update residuals %0d, downdate residuals %0d", n_upd, n_dnd);
    end
    $display("rows=%0d back-to-back=%0d update residuals=%0d downdate residuals=%0d max error=%0d ppm",
             NROWS, pairs, n_upd, n_dnd, max_err_ppm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
