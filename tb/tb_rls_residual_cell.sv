// tb_rls_residual_cell: self-checking test of the residual multiplier.
// Random v and gamma values are applied; one clock later e_out must equal
// -gamma * v (within rounding) and valid/mode must follow v's tags.
module tb_rls_residual_cell;
  import rls_pkg::*;
  import tb_rls_ref_pkg::*;

  logic      clk = 0, rst_n;
  xbus_t     v_in;
  fx_t       gamma_in, e_out;
  logic      e_valid;
  rot_mode_e e_mode;
  int        checks = 0, failures = 0;

  rls_residual_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, g;
    rot_mode_e m;
    logic ok;
    rst_n = 0;
    v_in = '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
    gamma_in = FX_ONE;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      v = (real'($urandom_range(4000)) - 2000.0) / 1000.0;
      g = real'($urandom_range(3000)) / 1000.0;
      m = $urandom_range(1) ? ROT_DOWNDATE : ROT_UPDATE;
      ok = $urandom_range(1);
      v_in = '{valid: ok, mode: m, x: r2fx(v)};
      gamma_in = r2fx(g);
      v = fx2r(r2fx(v)); g = fx2r(r2fx(g));
      @(negedge clk);
      checks++;
      if (rabs(fx2r(e_out) + g * v) > 1e-4 || e_valid != ok || e_mode != m) begin
        failures++;
        if (failures < 10) $display("e %f exp %f", fx2r(e_out), -g * v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
