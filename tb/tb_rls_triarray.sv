// tb_rls_triarray: self-checking test of the dual-state triarray on its own.
//
// The testbench plays the part of the front end: it sends, on alternate
// clocks, an updating wavefront with a new row and a downdating wavefront
// with the row that left a window of LW rows, skewing column j by j clocks.
// For each wavefront it checks, 2P clocks after the wavefront entered cell
// (0,0), that v_out carries the wavefront's mode and that -gamma * v equals
// the floating-point least-squares residual (update: new row on LW+1 rows,
// downdate: old row on the new window). After draining it compares
// R^T [R : u] with the window sums. Finally it downdates a row that is
// not in the window with |x| larger than r, which must raise dd_fail.
// Runs at P = 3, a different order from the default, to exercise the
// generic array construction.
module tb_rls_triarray;
  import rls_pkg::*;
  import tb_rls_ref_pkg::*;

  localparam int unsigned P     = 3;
  localparam int          LW    = 10;
  localparam int          NROWS = 60;
  localparam real         TOL   = 0.004;

  logic  clk = 0, rst_n, clear;
  xbus_t col_in [P+1];
  xbus_t v_out;
  fx_t   gamma_out;
  logic  dd_fail [P];
  fx_t   r_mat [P][P+1];
  int    checks = 0, failures = 0;

  rls_triarray #(.P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xs [NROWS+1][P+1];    // column P is y

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
        b[i] += xs[k][i] * xs[k][P];
        for (int j = 0; j < P; j++) a[i][j] += xs[k][i] * xs[k][j];
      end
    w = ls_solve(a, b, P);
    e = -xs[t][P];
    for (int i = 0; i < P; i++) e += xs[t][i] * w[i];
    return e;
  endfunction

  // unskewed wavefront stream built by the stimulus, skewed here
  xbus_t row_now [P+1];
  xbus_t skew_sr [P+1][P+1];
  always @(posedge clk) begin
    for (int j = 0; j <= P; j++) begin
      skew_sr[j][0] <= row_now[j];
      for (int d = 1; d <= P; d++) skew_sr[j][d] <= skew_sr[j][d-1];
      if (!rst_n)
        for (int d = 0; d <= P; d++) skew_sr[j][d] <= '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
    end
  end
  for (genvar j = 0; j <= P; j++) begin : g_skew
    assign col_in[j] = (j == 0) ? row_now[0] : skew_sr[j][j-1];
  end

  typedef struct {
    rot_mode_e mode;
    int        row;
    int        due;
  } exp_t;
  exp_t exp_q [$];
  int   cyc = 0, n_upd = 0, n_dnd = 0, fails_seen = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    for (int i = 0; i < P; i++) if (rst_n && dd_fail[i]) fails_seen++;
    if (rst_n && v_out.valid) begin
      exp_t x;
      real  e, got;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        x = exp_q.pop_front();
        if (x.mode != v_out.mode || x.due != cyc) begin
          failures++;
          $display("row %0d: mode %0d at %0d, expected mode %0d at %0d", x.row, v_out.mode, cyc, x.mode, x.due);
        end
        if (x.row >= NROWS) begin
          // the deliberately impossible downdate: only its timing is checked
        end else if (x.mode == ROT_UPDATE) begin
          n_upd++; e = resid(x.row, (x.row >= LW) ? x.row - LW : 0, x.row);
        end else begin
          n_dnd++; e = resid(x.row - LW, x.row - LW + 1, x.row);
        end
        got = -fx2r(gamma_out) * fx2r(v_out.x);
        if (x.row >= 2 * P && x.row < NROWS) begin
          checks++;
          if (rabs(got - e) > TOL) begin
            failures++;
            if (failures < 20) $display("row %0d mode %0d: e=%f expected %f", x.row, x.mode, got, e);
          end
        end
      end
    end
  end

  task automatic send(logic v, rot_mode_e m, int row);
    for (int j = 0; j <= P; j++) row_now[j] = '{valid: v, mode: m, x: r2fx(xs[row][j])};
    if (v) exp_q.push_back('{mode: m, row: (m == ROT_UPDATE) ? row : row + LW, due: cyc + 2 * P});
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0; clear = 0;
    for (int j = 0; j <= P; j++) row_now[j] = '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
    for (int n = 0; n <= NROWS; n++) begin
      for (int j = 0; j <= P; j++) xs[n][j] = fx2r(r2fx((real'($urandom_range(1000)) - 500.0) / 1000.0));
      xs[n][P] = fx2r(r2fx(0.3 * xs[n][0] - 0.2 * xs[n][2] + 0.1 * xs[n][P]));
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NROWS; k++) begin
      send(1'b1, ROT_UPDATE, k);
      send(k >= LW, ROT_DOWNDATE, (k >= LW) ? k - LW : 0);
    end
    for (int n = 0; n < 4 * P + 4; n++) send(1'b0, (n % 2) ? ROT_DOWNDATE : ROT_UPDATE, 0);
    for (int i = 0; i < P; i++)
      for (int j = 0; j <= P; j++) begin
        real acc, ref_v;
        acc = 0.0; ref_v = 0.0;
        for (int m = 0; m < P; m++) acc += fx2r(r_mat[m][i]) * fx2r(r_mat[m][j]);
        for (int n = NROWS - LW; n < NROWS; n++) ref_v += xs[n][i] * xs[n][j];
        checks++;
        if (rabs(acc - ref_v) > 0.01 + 0.01 * rabs(ref_v)) begin
          failures++; $display("R^T[R:u](%0d,%0d) = %f, window sum %f", i, j, acc, ref_v);
        end
      end
    checks++;
    if (n_upd != NROWS || n_dnd != NROWS - LW || fails_seen != 0) begin
      failures++; $display("updates %0d downdates %0d failures %0d", n_upd, n_dnd, fails_seen);
    end
    // impossible downdate: a row with a first element larger than r(0,0)
    xs[NROWS][0] = fx2r(r_mat[0][0]) + 1.0;
    exp_q.delete();
    send(1'b1, ROT_DOWNDATE, NROWS);
    for (int n = 0; n < 4 * P + 4; n++) send(1'b0, (n % 2) ? ROT_UPDATE : ROT_DOWNDATE, 0);
    checks++;
    if (fails_seen == 0) begin failures++; $display("impossible downdate not flagged"); end
    $display("updates=%0d downdates=%0d impossible downdates flagged=%0d", n_upd, n_dnd, fails_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
