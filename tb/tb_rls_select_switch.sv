// tb_rls_select_switch: self-checking test of a column's selection switch.
// Rows are offered in phase-0 clocks with random gaps; for each data clock
// the switch must put out the new sample tagged for updating in phase 1 and
// the old sample tagged for downdating in the next phase 0, with valid low
// for a missing row and for an old sample that is not yet in the window.
module tb_rls_select_switch;
  import rls_pkg::*;

  logic  clk = 0, rst_n, accept, phase, old_valid;
  fx_t   new_data, old_data;
  xbus_t x_out;
  int    checks = 0, failures = 0;
  int    n_up = 0, n_dn = 0;

  rls_select_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(xbus_t got, logic v, rot_mode_e m, fx_t x);
    checks++;
    if (got.valid != v || got.mode != m || (v && got.x != x)) begin
      failures++;
      if (failures < 10) $display("got %0b/%0b/%h exp %0b/%0b/%h", got.valid, got.mode, got.x, v, m, x);
    end
  endtask

  initial begin
    logic a, ov;
    fx_t  nd, od;
    rst_n = 0; accept = 0; phase = 0; old_valid = 0; new_data = '0; old_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      // phase 0: present a row
      phase = 0;
      a  = ($urandom_range(3) != 0);
      ov = (n > 5) && ($urandom_range(4) != 0);
      nd = fx_t'($urandom); od = fx_t'($urandom);
      accept = a; old_valid = ov; new_data = nd; old_data = od;
      @(negedge clk);
      // phase 1: update slot
      phase = 1; accept = 0; new_data = fx_t'($urandom); old_data = fx_t'($urandom);
      #1 check(x_out, a, ROT_UPDATE, nd);
      if (a) n_up++;
      @(negedge clk);
      // next phase 0: downdate slot (checked before the next row is taken)
      phase = 0; accept = 0;
      #1 check(x_out, a && ov, ROT_DOWNDATE, od);
      if (a && ov) n_dn++;
    end
    checks++;
    if (n_up == 0 || n_dn == 0) begin failures++; $display("a slot type was never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
