// tb_rls_frontend_ctrl: self-checking test of the data-clock sequencer.
// Checks that phase alternates every clock starting with 0, that in_ready is
// high exactly in phase 0 (one row per two clocks), that the write address
// advances modulo L on every accepted row and nowhere else, and that
// old_valid rises exactly when L rows have been accepted.
module tb_rls_frontend_ctrl;
  localparam int unsigned L = 8;

  logic                 clk = 0, rst_n, in_valid;
  logic                 in_ready, accept, phase, old_valid;
  logic [$clog2(L)-1:0] wr_addr;
  int                   checks = 0, failures = 0;

  rls_frontend_ctrl #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int ph = 0, addr = 0, rows = 0;
    rst_n = 0; in_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      in_valid = ($urandom_range(2) != 0);
      #1;
      expect_eq("phase", int'(phase), ph);
      expect_eq("in_ready", int'(in_ready), (ph == 0) ? 1 : 0);
      expect_eq("accept", int'(accept), (ph == 0 && in_valid) ? 1 : 0);
      expect_eq("wr_addr", int'(wr_addr), addr);
      expect_eq("old_valid", int'(old_valid), (rows >= L) ? 1 : 0);
      if (accept) begin
        addr = (addr + 1) % L;
        rows++;
      end
      ph = 1 - ph;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
