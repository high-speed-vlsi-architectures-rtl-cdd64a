// tb_rls_window_buffer: self-checking test of one window buffer. Random
// samples are pushed at a circular address, with random gaps; at each push
// the word presented on old_data must be the sample pushed L pushes earlier
// (the one leaving the window), checked once the buffer has been filled.
module tb_rls_window_buffer;
  import rls_pkg::*;

  localparam int unsigned L = 16;

  logic                 clk = 0;
  logic                 push;
  logic [$clog2(L)-1:0] addr;
  fx_t                  new_data, old_data;
  int                   checks = 0, failures = 0;
  fx_t                  hist [$];

  rls_window_buffer #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pushes = 0;
    push = 0; addr = '0; new_data = '0;
    repeat (2) @(posedge clk);
    while (pushes < 500) begin
      @(negedge clk);
      push     = ($urandom_range(3) != 0);
      new_data = fx_t'($urandom);
      #1;
      if (push) begin
        if (hist.size() >= L) begin
          checks++;
          if (old_data != hist[hist.size() - L]) begin
            failures++;
            if (failures < 10) $display("push %0d: old %h exp %h", pushes, old_data, hist[hist.size() - L]);
          end
        end
        hist.push_back(new_data);
        pushes++;
        @(posedge clk);
        #1 addr = (addr == ($clog2(L))'(L - 1)) ? '0 : addr + 1'b1;
      end
    end
    @(negedge clk) push = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
