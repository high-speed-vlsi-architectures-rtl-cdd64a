// tb_huffman_fsm_decoder: self-checking test of the bit-serial Huffman
// decoder. A random symbol stream (a..e, drawn with the code's design
// probabilities 0.5/0.25/0.1/0.1/0.05) is encoded in the testbench with the
// code a:0 b:10 c:110 d:1111 e:1110 and fed one bit per clock, with random
// idle clocks. Every bit clock the five flags are compared with the flag
// expected from the encoder (the symbol whose last bit this is). Also checks
// that the machine is back in S1 after each code word and that every symbol
// was decoded at least once.
module tb_huffman_fsm_decoder;
  import huffman_pkg::*;

  logic    clk = 0;
  logic    rst_n;
  logic    bit_valid, bit_in;
  hsym_t   sym;
  hstate_t state;
  int      checks = 0, failures = 0;
  int      seen [5];

  huffman_fsm_decoder dut (.*);

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
    case (s)
      0: begin bits_q.push_back(0); f.a = 1; end
      1: begin bits_q.push_back(1); bits_q.push_back(0); f.b = 1; end
      2: begin bits_q.push_back(1); bits_q.push_back(1); bits_q.push_back(0); f.c = 1; end
      3: begin repeat (4) bits_q.push_back(1); f.d = 1; end
      default: begin repeat (3) bits_q.push_back(1); bits_q.push_back(0); f.e = 1; end
    endcase
    for (int k = 1; k < ((s == 0) ? 1 : (s == 1) ? 2 : (s == 2) ? 3 : 4); k++) exp_q.push_back('0);
    exp_q.push_back(f);
  endtask

  initial begin
    hsym_t e;
    rst_n = 0; bit_valid = 0; bit_in = 0;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 2000; n++) encode(pick_symbol());
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (bits_q.size() > 0) begin
      if ($urandom_range(7) == 0) begin
        bit_valid = 0; bit_in = $urandom_range(1);
        #1;
        checks++;
        if (sym != '0) begin failures++; $display("flag on idle clock"); end
      end else begin
        bit_valid = 1; bit_in = bits_q.pop_front();
        e = exp_q.pop_front();
        #1;
        checks++;
        if (sym !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %b exp %b", sym, e);
        end
        if (e.a) seen[0]++;
        if (e.b) seen[1]++;
        if (e.c) seen[2]++;
        if (e.d) seen[3]++;
        if (e.e) seen[4]++;
      end
      @(posedge clk); #1;
      if (bit_valid && e != '0) begin
        checks++;
        if (state != S1) begin failures++; $display("not back in S1 after a code word"); end
      end
      #3;
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("symbol %0d never decoded", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
