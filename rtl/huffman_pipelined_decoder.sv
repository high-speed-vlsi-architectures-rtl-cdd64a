// huffman_pipelined_decoder: bit-serial Huffman decoder whose state loop is
// pipelined by look-ahead.
//
// The plain machine s(n+1) = s(n) T(n) has a one-clock feedback loop. Applied
// M times it becomes s(n+1) = s(n+1-M) P(n+1-M), with
// P(n+1-M) = T(n+1-M) ... T(n) built from the last M input bits only. This
// loop spans M clocks, so it holds M registers, which are placed inside the
// Boolean vector-matrix product: one register after the AND terms
// s_i & P_ij, and M-1 registers of state history after the OR. The window
// product P is computed outside the loop from the bit history and registered
// (one feed-forward stage). The decoder still reads one bit per clock; only
// the loop is cut into shorter pieces.
//
// Start-up: after reset the bit history is all zeros and all states are S1.
// A 0 bit sends every state to S1, so this is exactly the machine having
// been in S1 before the first bit.
//
// Interface: bit_valid qualifies bit_in; the state loop advances only on
// valid bits, so idle clocks may come at any time. sym (the one-hot flags of
// a..e, same rule as huffman_fsm_decoder) with sym_valid follows each valid
// bit by exactly two clocks: one feed-forward stage, one output register.
// One bit per clock. The look-ahead order M (M >= 2) is a choice of this
// design.
module huffman_pipelined_decoder
  import huffman_pkg::*;
#(
  parameter int unsigned M = 4           // loop delays (look-ahead order)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bit_valid,
  input  logic  bit_in,
  output logic  sym_valid,
  output hsym_t sym
);

  // ---------------- feed-forward stage: window product of the last M bits
  logic [M-2:0] hist;        // hist[0] = previous bit, hist[M-2] = oldest
  hmat_t        win_c, win_q;
  logic         x_q, v_q;

  always_comb begin
    win_c = identity();
    for (int k = M - 2; k >= 0; k--) win_c = mat_mat(win_c, t_matrix(hist[k]));
    win_c = mat_mat(win_c, t_matrix(bit_in));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist  <= '0;
      win_q <= identity();
      x_q   <= 1'b0;
      v_q   <= 1'b0;
    end else begin
      v_q <= bit_valid;
      if (bit_valid) begin
        hist  <= {hist[M-3:0], bit_in};
        win_q <= win_c;
        x_q   <= bit_in;
      end
    end
  end

  // ---------------- look-ahead loop with M registers
  hmat_t   and_q;            // AND terms of s(n+1-M) and P(n+1-M)
  hstate_t s_hist [M-1];     // s_hist[k] = s(n-1-k)
  hstate_t s_cur;            // s(n), state for the bit now in x_q
  hstate_t s_old;            // s(n+1-M)
  hmat_t   and_c;

  always_comb begin
    s_cur = '0;
    for (int i = 0; i < 4; i++) s_cur |= and_q[i];
    s_old = (M == 2) ? s_hist[0] : s_hist[M-2];
    for (int i = 0; i < 4; i++) and_c[i] = s_old[i] ? win_q[i] : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      and_q     <= identity();
      for (int i = 1; i < 4; i++) and_q[i] <= '0;
      for (int k = 0; k < M - 1; k++) s_hist[k] <= S1;
      sym_valid <= 1'b0;
      sym       <= '0;
    end else begin
      sym_valid <= v_q;
      sym       <= v_q ? symbol_out(s_cur, x_q) : '0;
      if (v_q) begin
        and_q     <= and_c;
        s_hist[0] <= s_cur;
        for (int k = 1; k < M - 1; k++) s_hist[k] <= s_hist[k-1];
      end
    end
  end

endmodule
