// tb_huffman_lookahead_decoder: self-checking test of the M-bit look-ahead
// Huffman decoder. A random symbol stream is encoded in the testbench
// (a:0 b:10 c:110 d:1111 e:1110), cut into M-bit blocks (so code words
// straddle block boundaries), and fed one block per clock with random idle
// clocks. Each block's M flag vectors are compared with the flags expected
// from the encoder. Checks the two-clock latency and the one-block-per-clock
// rate, counts code words that straddle a block boundary and requires each
// symbol to have been decoded.
module tb_huffman_lookahead_decoder;
  import huffman_pkg::*;

  localparam int unsigned M = 4;

  logic         clk = 0;
  logic         rst_n;
  logic         blk_valid;
  logic [M-1:0] blk_bits;
  logic         sym_valid;
  hsym_t        sym [M];
  hstate_t      state;
  int           checks = 0, failures = 0;
  int           seen [5];
  int           straddle = 0;

  huffman_lookahead_decoder #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_symbol();
    int r = $urandom_range(99);
    if (r < 50) return 0;
    if (r < 75) return 1;
    if (r < 85) return 2;
    if (r < 95) return 3;
    return 4;
  endfunction

  logic  bits_q [$];
  hsym_t exp_q  [$];

  task automatic encode(int s);
    hsym_t f = '0;
    int    len;
    len = (s == 0) ? 1 : (s == 1) ? 2 : (s == 2) ? 3 : 4;
    if ((bits_q.size() % M) + len > M) straddle++;
    case (s)
      0: begin bits_q.push_back(0); f.a = 1; end
      1: begin bits_q.push_back(1); bits_q.push_back(0); f.b = 1; end
      2: begin bits_q.push_back(1); bits_q.push_back(1); bits_q.push_back(0); f.c = 1; end
      3: begin repeat (4) bits_q.push_back(1); f.d = 1; end
      default: begin repeat (3) bits_q.push_back(1); bits_q.push_back(0); f.e = 1; end
    endcase
    for (int k = 1; k < len; k++) exp_q.push_back('0);
    exp_q.push_back(f);
    seen[s]++;
  endtask

  // expected flag blocks with their issue clock
  typedef hsym_t [M-1:0] blk_exp_t;
  blk_exp_t exp_blk_q [$];
  int       exp_cyc_q [$];
  int       cyc = 0;
  int       sent = 0, got = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // checker
  always @(posedge clk) begin
    if (rst_n && sym_valid) begin
      blk_exp_t eb;
      int       c0;
      got++;
      checks++;
      if (exp_blk_q.size() == 0) begin
        failures++; $display("unexpected output block");
      end else begin
        eb = exp_blk_q.pop_front();
        c0 = exp_cyc_q.pop_front();
        if (cyc - c0 != 2) begin failures++; $display("latency %0d, expected 2", cyc - c0); end
        for (int k = 0; k < M; k++) begin
          checks++;
          if (sym[k] !== eb[k]) begin
            failures++;
            if (failures < 10) $display("block %0d pos %0d: got %b exp %b", got, k, sym[k], eb[k]);
          end
        end
      end
    end
  end

  initial begin
    int streak, max_streak;
    rst_n = 0; blk_valid = 0; blk_bits = '0;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 3000; n++) encode(pick_symbol());
    while (bits_q.size() % M != 0) encode(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    streak = 0; max_streak = 0;
    while (bits_q.size() > 0) begin
      @(negedge clk);
      if ($urandom_range(5) == 0) begin
        blk_valid = 0;
        blk_bits  = M'($urandom);
        streak    = 0;
      end else begin
        blk_exp_t eb;
        blk_valid = 1;
        for (int k = 0; k < M; k++) begin
          blk_bits[k] = bits_q.pop_front();
          eb[k]       = exp_q.pop_front();
        end
        exp_blk_q.push_back(eb);
        exp_cyc_q.push_back(cyc);
        sent++;
        streak++;
        if (streak > max_streak) max_streak = streak;
      end
    end
    @(negedge clk) blk_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent) begin failures++; $display("sent %0d blocks, got %0d", sent, got); end
    // a run of back-to-back blocks proves one block per clock
    checks++;
    if (max_streak < 4) begin failures++; $display("no back-to-back blocks"); end
    checks++;
    if (straddle == 0) begin failures++; $display("no code word straddled a block"); end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("symbol %0d never sent", i); end
    end
    $display("blocks=%0d straddling code words=%0d", sent, straddle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
