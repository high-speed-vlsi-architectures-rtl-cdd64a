// tb_huffman_pipelined_decoder: self-checking test of the look-ahead
// pipelined bit-serial Huffman decoder. A random symbol stream is encoded in
// the testbench (a:0 b:10 c:110 d:1111 e:1110) and fed one bit per clock
// with random idle clocks. The flags of every bit are compared in order with
// the encoder's expectation; the flags of every bit must appear exactly two
// clocks after it, and long runs of back-to-back bits show the
// one-bit-per-clock rate. Runs for
// look-ahead orders M = 2 and M = 4.
module tb_huffman_pipelined_decoder;
  import huffman_pkg::*;

  logic  clk = 0;
  logic  rst_n;
  logic  bit_valid, bit_in;
  logic  sym_valid2, sym_valid4;
  hsym_t sym2, sym4;
  int    checks = 0, failures = 0;
  int    seen [5];

  huffman_pipelined_decoder #(.M(2)) dut2 (.clk, .rst_n, .bit_valid, .bit_in, .sym_valid(sym_valid2), .sym(sym2));
  huffman_pipelined_decoder          dut4 (.clk, .rst_n, .bit_valid, .bit_in, .sym_valid(sym_valid4), .sym(sym4));

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
    int    len = (s == 0) ? 1 : (s == 1) ? 2 : (s == 2) ? 3 : 4;
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

  hsym_t exp2_q [$], exp4_q [$];
  int    due_q  [$];
  int    cyc = 0, got2 = 0, got4 = 0, on_time = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    hsym_t e;
    int    d;
    if (rst_n && sym_valid2) begin
      checks++; got2++;
      if (exp2_q.size() == 0) begin failures++; $display("M=2: unexpected output"); end
      else begin
        e = exp2_q.pop_front();
        if (sym2 != e) begin failures++; if (failures < 10) $display("M=2 bit %0d: got %b exp %b", got2, sym2, e); end
      end
    end
    if (rst_n && sym_valid4) begin
      checks++; got4++;
      if (exp4_q.size() == 0) begin failures++; $display("M=4: unexpected output"); end
      else begin
        e = exp4_q.pop_front();
        d = due_q.pop_front();
        if (sym4 != e) begin failures++; if (failures < 10) $display("M=4 bit %0d: got %b exp %b", got4, sym4, e); end
        if (d == cyc) on_time++;
      end
    end
  end

  initial begin
    int sent = 0, streak = 0, max_streak = 0, n_idle = 0;
    rst_n = 0; bit_valid = 0; bit_in = 0;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 2000; n++) encode(pick_symbol());
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (bits_q.size() > 0) begin
      if ($urandom_range(9) == 0) begin
        bit_valid = 0; bit_in = $urandom_range(1); streak = 0; n_idle++;
      end else begin
        hsym_t e;
        bit_valid = 1; bit_in = bits_q.pop_front();
        e = exp_q.pop_front();
        exp2_q.push_back(e); exp4_q.push_back(e);
        due_q.push_back(cyc + 2);
        sent++; streak++;
        if (streak > max_streak) max_streak = streak;
      end
      @(negedge clk);
    end
    bit_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (got2 != sent || got4 != sent) begin failures++; $display("sent %0d, decoded %0d/%0d", sent, got2, got4); end
    checks++;
    if (on_time != sent) begin failures++; $display("only %0d of %0d bits decoded with latency 2", on_time, sent); end
    checks++;
    if (max_streak < 8 || n_idle == 0) begin failures++; $display("no long run of bits or no idle clock"); end
    foreach (seen[i]) begin
      checks++; if (seen[i] == 0) begin failures++; $display("symbol %0d never sent", i); end
    end
    $display("bits=%0d on time=%0d idle=%0d longest run=%0d", sent, on_time, n_idle, max_streak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
