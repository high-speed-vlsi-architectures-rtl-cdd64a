// tb_rls_boundary_cell: self-checking test of the diagonal processor. The
// stored r is driven through a random sequence of updating and downdating
// elements; after each one the testbench compares r, c, s and gamma with
// floating-point values of the Givens (r' = sqrt(r^2+x^2)) or hyperbolic
// (r' = sqrt(r^2-x^2)) rotation, c = r/r', s = x/r', and checks the
// one-clock output register. Also exercises an impossible downdate
// (|x| > r), which must raise dd_fail and leave r unchanged, and empty slots.
module tb_rls_boundary_cell;
  import rls_pkg::*;
  import tb_rls_ref_pkg::*;

  logic  clk = 0, rst_n, clear;
  xbus_t x_in;
  fx_t   gamma_in, gamma_out, r_out;
  rot_t  rot_out;
  logic  dd_fail;
  int    checks = 0, failures = 0;
  int    n_up = 0, n_dn = 0, n_fail = 0;

  rls_boundary_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(string what, real got, real exp, real tol);
    checks++;
    if (rabs(got - exp) > tol) begin
      failures++;
      if (failures < 20) $display("%s: got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    real r, x, g, rn, c, s;
    rot_mode_e m;
    rst_n = 0; clear = 0;
    x_in = '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
    gamma_in = FX_ONE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    r = 0.0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      x = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
      g = real'($urandom_range(1000)) / 1000.0;
      if (n % 10 == 9) begin
        // empty slot
        x_in = '{valid: 1'b0, mode: ROT_DOWNDATE, x: r2fx(x)};
        @(posedge clk); #1;
        near("r after empty slot", fx2r(r_out), r, 1e-4);
        checks++;
        if (rot_out.valid || rot_out.c != FX_ONE || rot_out.s != 0) begin
          failures++; $display("empty slot did not pass identity rotation");
        end
        continue;
      end
      m = (r > 1.0 && $urandom_range(1) == 1) ? ROT_DOWNDATE : ROT_UPDATE;
      if (n % 50 == 48) begin
        m = ROT_DOWNDATE;
        x = r + 0.5;        // impossible downdate
      end else if (m == ROT_DOWNDATE && rabs(x) > 0.7 * r) begin
        x = 0.7 * r * ((x < 0) ? -1.0 : 1.0);
      end
      x_in     = '{valid: 1'b1, mode: m, x: r2fx(x)};
      gamma_in = r2fx(g);
      r        = fx2r(r_out);     // use the stored value as the reference start
      @(posedge clk); #1;
      checks++;
      if (rot_out.mode != m || !rot_out.valid) begin failures++; $display("mode/valid not forwarded"); end
      if (m == ROT_DOWNDATE && r * r - x * x <= 0.0) begin
        n_fail++;
        checks++;
        if (!dd_fail) begin failures++; $display("impossible downdate not flagged"); end
        near("r kept", fx2r(r_out), r, 1e-4);
        near("c identity", fx2r(rot_out.c), 1.0, 1e-4);
        near("s identity", fx2r(rot_out.s), 0.0, 1e-4);
      end else begin
        rn = (m == ROT_UPDATE) ? $sqrt(r * r + x * x) : $sqrt(r * r - x * x);
        c  = r / rn;
        s  = x / rn;
        if (m == ROT_UPDATE) n_up++; else n_dn++;
        checks++;
        if (dd_fail) begin failures++; $display("spurious dd_fail"); end
        near("r'", fx2r(r_out), rn, 2e-4);
        near("c", fx2r(rot_out.c), c, 2e-4 * (1.0 + c));
        near("s", fx2r(rot_out.s), s, 2e-4 * (1.0 + rabs(s)));
        near("gamma", fx2r(gamma_out), g * c, 3e-4 * (1.0 + c));
        r = rn;
      end
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_fail == 0) begin
      failures++; $display("a case was never exercised: up=%0d down=%0d fail=%0d", n_up, n_dn, n_fail);
    end
    $display("updates=%0d downdates=%0d impossible=%0d", n_up, n_dn, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
