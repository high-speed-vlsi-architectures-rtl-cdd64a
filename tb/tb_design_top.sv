// tb_design_top: end-to-end test of design_top at its default parameters
// (P = 4, L = 16, M = 4), with no parameter overrides.
//
// RLS section: 100 rows with random gaps go through the sliding-window
// processor; every update and downdate residual is compared with a
// floating-point least-squares solve, with its latency (2P+2 clocks, the
// downdate one clock later). Then R is cleared while old rows are still in
// the window buffers, so the next downdates are impossible and must be
// flagged on dd_fail.
// Huffman section: one random symbol stream is encoded here and fed to the
// bit-serial decoder (one bit per clock), the look-ahead pipelined decoder
// (one bit per clock, flags two clocks later) and the look-ahead block
// decoder (M bits per clock); all flag streams are compared with the
// encoder's.
//
// Mechanisms counted (each must occur): updating wavefronts, downdating
// wavefronts, empty downdating slots while the window fills, rows accepted
// back to back (one per two clocks), impossible downdates, code words of
// every symbol, code words straddling a block boundary, idle clocks.
module tb_design_top;
  import rls_pkg::*;
  import huffman_pkg::*;
  import tb_rls_ref_pkg::*;

  localparam int unsigned P = 4, L = 16, M = 4;
  localparam int NROWS = 100;
  localparam int LATENCY = 2 * P + 2;
  localparam real TOL = 0.004;

  logic         clk = 0, rst_n;
  logic         rls_clear, rls_in_valid, rls_in_ready;
  fx_t          rls_in_x [P];
  fx_t          rls_in_y;
  logic         rls_e_valid, rls_dd_fail;
  rot_mode_e    rls_e_mode;
  fx_t          rls_e_out;
  fx_t          rls_r_mat [P][P+1];
  logic         hs_bit_valid, hs_bit;
  hsym_t        hs_sym;
  hstate_t      hs_state;
  logic         hp_bit_valid, hp_bit, hp_sym_valid;
  hsym_t        hp_sym;
  logic         hb_blk_valid;
  logic [M-1:0] hb_blk_bits;
  logic         hb_sym_valid;
  hsym_t        hb_sym [M];
  hstate_t      hb_state;

  int checks = 0, failures = 0;

  design_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- RLS
  real xs [NROWS][P];
  real ys [NROWS];

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
        b[i] += xs[k][i] * ys[k];
        for (int j = 0; j < P; j++) a[i][j] += xs[k][i] * xs[k][j];
      end
    w = ls_solve(a, b, P);
    e = -ys[t];
    for (int i = 0; i < P; i++) e += xs[t][i] * w[i];
    return e;
  endfunction

  typedef struct {
    rot_mode_e mode;
    int        row;
    int        due;
  } exp_t;
  exp_t exp_q [$];
  int   accepted = 0, n_upd = 0, n_dnd = 0, n_empty_dd = 0, n_b2b = 0, n_ddfail = 0;
  int   last_acc = -10;
  logic checking = 1'b1;

  always @(posedge clk) begin
    if (rst_n && rls_in_valid && rls_in_ready) begin
      if (cyc - last_acc == 2) n_b2b++;
      last_acc <= cyc;
      if (checking) begin
        exp_q.push_back('{mode: ROT_UPDATE, row: accepted, due: cyc + LATENCY});
        if (accepted >= L) exp_q.push_back('{mode: ROT_DOWNDATE, row: accepted, due: cyc + LATENCY + 1});
        else n_empty_dd++;
      end
      accepted <= accepted + 1;
    end
    if (rst_n && rls_dd_fail) n_ddfail++;
    if (rst_n && rls_e_valid && checking) begin
      exp_t x;
      real  e, got;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected residual at %0d", cyc);
      end else begin
        x = exp_q.pop_front();
        if (x.mode != rls_e_mode || x.due != cyc) begin
          failures++;
          $display("residual of row %0d: mode %0d at %0d, expected mode %0d at %0d",
                   x.row, rls_e_mode, cyc, x.mode, x.due);
        end
        if (x.mode == ROT_UPDATE) begin
          n_upd++; e = resid(x.row, (x.row >= L) ? x.row - L : 0, x.row);
        end else begin
          n_dnd++; e = resid(x.row - L, x.row - L + 1, x.row);
        end
        got = fx2r(rls_e_out);
        if (x.row >= 2 * P) begin
          checks++;
          if (rabs(got - e) > TOL) begin
            failures++;
            if (failures < 20) $display("row %0d mode %0d: e=%f expected %f", x.row, x.mode, got, e);
          end
        end
      end
    end
  end

  task automatic offer_row(int k);
    // wait for a ready clock, then present the row for that clock
    while (!rls_in_ready) @(negedge clk);
    rls_in_valid = 1'b1;
    for (int i = 0; i < P; i++) rls_in_x[i] = r2fx(xs[k][i]);
    rls_in_y = r2fx(ys[k]);
    @(negedge clk);
    rls_in_valid = 1'b0;
  endtask

  task automatic run_rls();
    for (int n = 0; n < NROWS; n++) begin
      ys[n] = (real'($urandom_range(1000)) - 500.0) / 10000.0;
      for (int i = 0; i < P; i++) begin
        xs[n][i] = fx2r(r2fx((real'($urandom_range(1000)) - 500.0) / 1000.0));
        ys[n] += xs[n][i] * 0.25 * real'(i + 1) * ((i % 2) ? -1.0 : 1.0);
      end
      ys[n] = fx2r(r2fx(ys[n]));
    end
    for (int k = 0; k < NROWS; k++) begin
      if ($urandom_range(4) == 0) repeat ($urandom_range(3) + 1) @(negedge clk);
      offer_row(k);
    end
    repeat (4 * P + 8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_upd != NROWS || n_dnd != NROWS - L) begin
      failures++; $display("residuals: %0d updates, %0d downdates, %0d missing", n_upd, n_dnd, exp_q.size());
    end
    checks++;
    if (n_ddfail != 0) begin failures++; $display("downdate failed on a consistent stream"); end
    // clear R while the window buffers still hold rows: the next downdates
    // remove rows that are not in R and cannot be carried out
    checking = 1'b0;
    rls_clear = 1'b1;
    @(negedge clk);
    rls_clear = 1'b0;
    for (int k = 0; k < 4; k++) offer_row(k);
    repeat (4 * P + 8) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- Huffman
  logic  bits_q  [$];
  hsym_t exp_s_q [$];
  int    seen [5];
  int    n_straddle = 0, n_idle = 0;

  task automatic encode(int s);
    hsym_t f = '0;
    int    len = (s == 0) ? 1 : (s == 1) ? 2 : (s == 2) ? 3 : 4;
    if ((bits_q.size() % M) + len > M) n_straddle++;
    case (s)
      0: begin bits_q.push_back(0); f.a = 1; end
      1: begin bits_q.push_back(1); bits_q.push_back(0); f.b = 1; end
      2: begin bits_q.push_back(1); bits_q.push_back(1); bits_q.push_back(0); f.c = 1; end
      3: begin repeat (4) bits_q.push_back(1); f.d = 1; end
      default: begin repeat (3) bits_q.push_back(1); bits_q.push_back(0); f.e = 1; end
    endcase
    for (int k = 1; k < len; k++) exp_s_q.push_back('0);
    exp_s_q.push_back(f);
    seen[s]++;
  endtask

  logic  hb_bits_all [$];
  hsym_t hb_exp_all  [$];

  task automatic run_serial();
    logic  b [$] = bits_q;
    hsym_t e [$] = exp_s_q;
    while (b.size() > 0) begin
      if ($urandom_range(9) == 0) begin
        hs_bit_valid = 0; n_idle++;
        #1;
        checks++;
        if (hs_sym != '0) begin failures++; $display("serial decoder flagged on idle clock"); end
      end else begin
        hsym_t x;
        hs_bit_valid = 1; hs_bit = b.pop_front(); x = e.pop_front();
        #1;
        checks++;
        if (hs_sym != x) begin
          failures++; if (failures < 20) $display("serial: got %b exp %b", hs_sym, x);
        end
      end
      @(negedge clk);
    end
    hs_bit_valid = 0;
  endtask

  // pipelined decoder: flags of every bit two clocks later
  hsym_t hp_exp_q [$];
  int    hp_due_q [$];
  int    hp_sent = 0, hp_got = 0;

  always @(posedge clk) begin
    hsym_t x;
    int    d;
    if (rst_n && hp_sym_valid) begin
      hp_got++;
      checks++;
      if (hp_exp_q.size() == 0) begin
        failures++; $display("unexpected pipelined output");
      end else begin
        x = hp_exp_q.pop_front();
        d = hp_due_q.pop_front();
        if (hp_sym != x || d != cyc) begin
          failures++; if (failures < 20) $display("pipelined: got %b exp %b at %0d (due %0d)", hp_sym, x, cyc, d);
        end
      end
    end
  end

  task automatic run_pipelined();
    logic  b [$] = bits_q;
    hsym_t e [$] = exp_s_q;
    while (b.size() > 0) begin
      if ($urandom_range(9) == 0) begin
        hp_bit_valid = 0; hp_bit = $urandom_range(1);
      end else begin
        hp_bit_valid = 1; hp_bit = b.pop_front();
        hp_exp_q.push_back(e.pop_front());
        hp_due_q.push_back(cyc + 2);
        hp_sent++;
      end
      @(negedge clk);
    end
    hp_bit_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  typedef hsym_t [M-1:0] blk_t;
  blk_t hb_exp_q [$];
  int   hb_sent = 0, hb_got = 0;

  always @(posedge clk) begin
    if (rst_n && hb_sym_valid) begin
      blk_t eb;
      hb_got++;
      checks++;
      if (hb_exp_q.size() == 0) begin
        failures++; $display("unexpected block output");
      end else begin
        eb = hb_exp_q.pop_front();
        for (int k = 0; k < M; k++) begin
          checks++;
          if (hb_sym[k] != eb[k]) begin
            failures++; if (failures < 20) $display("block: pos %0d got %b exp %b", k, hb_sym[k], eb[k]);
          end
        end
      end
    end
  end

  task automatic run_block();
    logic  b [$] = bits_q;
    hsym_t e [$] = exp_s_q;
    while (b.size() > 0) begin
      if ($urandom_range(7) == 0) begin
        hb_blk_valid = 0; hb_blk_bits = M'($urandom);
      end else begin
        blk_t eb;
        hb_blk_valid = 1;
        for (int k = 0; k < M; k++) begin
          hb_blk_bits[k] = b.pop_front();
          eb[k]          = e.pop_front();
        end
        hb_exp_q.push_back(eb);
        hb_sent++;
      end
      @(negedge clk);
    end
    hb_blk_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    rst_n = 0; rls_clear = 0; rls_in_valid = 0; rls_in_y = '0;
    foreach (rls_in_x[i]) rls_in_x[i] = '0;
    hs_bit_valid = 0; hs_bit = 0; hp_bit_valid = 0; hp_bit = 0; hb_blk_valid = 0; hb_blk_bits = '0;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 600; n++) begin
      int r;
      r = $urandom_range(99);
      encode((r < 50) ? 0 : (r < 75) ? 1 : (r < 85) ? 2 : (r < 95) ? 3 : 4);
    end
    while (bits_q.size() % M != 0) encode(0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      run_rls();
      run_serial();
      run_pipelined();
      run_block();
    join
    checks++;
    if (hp_got != hp_sent) begin failures++; $display("bits sent %0d, decoded %0d", hp_sent, hp_got); end
    checks++;
    if (hb_got != hb_sent) begin failures++; $display("blocks sent %0d, decoded %0d", hb_sent, hb_got); end
    // every mechanism must have happened
    checks++; if (n_upd == 0)      begin failures++; $display("no updating wavefront"); end
    checks++; if (n_dnd == 0)      begin failures++; $display("no downdating wavefront"); end
    checks++; if (n_empty_dd == 0) begin failures++; $display("no empty downdating slot"); end
    checks++; if (n_b2b == 0)      begin failures++; $display("no back-to-back rows"); end
    checks++; if (n_ddfail == 0)   begin failures++; $display("no impossible downdate flagged"); end
    checks++; if (n_straddle == 0) begin failures++; $display("no code word straddled a block"); end
    checks++; if (n_idle == 0)     begin failures++; $display("no idle clock"); end
    foreach (seen[i]) begin
      checks++; if (seen[i] == 0) begin failures++; $display("symbol %0d never sent", i); end
    end
    $display("rls: updates=%0d downdates=%0d empty downdate slots=%0d back-to-back=%0d impossible downdates=%0d",
             n_upd, n_dnd, n_empty_dd, n_b2b, n_ddfail);
    $display("huffman: symbols a=%0d b=%0d c=%0d d=%0d e=%0d blocks=%0d straddling=%0d idle=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], hb_sent, n_straddle, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
