// tb_rls_internal_cell: self-checking test of the off-diagonal processor.
// Random rotations (Givens with c^2 + s^2 = 1, hyperbolic with
// c^2 - s^2 = 1) and random x are applied to the stored r; r', the element
// sent down and the forwarded rotation are compared with floating-point
// values of
//   update:   r' = c r + s x,  x' = -s r + c x
//   downdate: r' = c r - s x,  x' = -s r + c x
// one clock after the inputs. Empty slots must leave r alone.
module tb_rls_internal_cell;
  import rls_pkg::*;
  import tb_rls_ref_pkg::*;

  logic  clk = 0, rst_n, clear;
  xbus_t x_in, x_out;
  rot_t  rot_in, rot_out;
  fx_t   r_out;
  int    checks = 0, failures = 0;
  int    n_up = 0, n_dn = 0, n_empty = 0;

  rls_internal_cell dut (.*);

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
    real r, x, c, s, th, rn, xn;
    rot_mode_e m;
    logic v;
    rst_n = 0; clear = 0;
    x_in   = '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
    rot_in = '{valid: 1'b0, mode: ROT_UPDATE, c: FX_ONE, s: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    r = 0.0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (rabs(r) > 4.0) begin
        // keep the stored value in range: clear it
        clear = 1; @(posedge clk); #1 clear = 0; r = 0.0;
        @(negedge clk);
      end
      x  = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
      th = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
      m  = $urandom_range(1) ? ROT_DOWNDATE : ROT_UPDATE;
      v  = ($urandom_range(9) != 0);
      if (m == ROT_UPDATE) begin c = $cos(th * 1.5); s = $sin(th * 1.5); end
      else begin c = $cosh(th); s = $sinh(th); end
      x_in   = '{valid: v, mode: m, x: r2fx(x)};
      rot_in = '{valid: v, mode: m, c: r2fx(c), s: r2fx(s)};
      c = fx2r(r2fx(c)); s = fx2r(r2fx(s)); x = fx2r(r2fx(x));
      if (!v) begin rn = r; xn = x; n_empty++; end
      else if (m == ROT_UPDATE) begin rn = c * r + s * x; xn = -s * r + c * x; n_up++; end
      else begin rn = c * r - s * x; xn = -s * r + c * x; n_dn++; end
      @(posedge clk); #1;
      near("r'", fx2r(r_out), rn, 1e-3);
      near("x'", fx2r(x_out.x), xn, 1e-3);
      checks++;
      if (x_out.valid != v || x_out.mode != m || rot_out != rot_in) begin
        failures++; $display("valid/mode/rotation not forwarded");
      end
      r = fx2r(r_out);
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_empty == 0) begin failures++; $display("a case was never exercised"); end
    $display("updates=%0d downdates=%0d empty=%0d", n_up, n_dn, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
