// huffman_lookahead_decoder: M-bit parallel (block) Huffman decoder using
// look-ahead on the state update s(n+1) = s(n) T(n).
//
// Iterating the update M times gives s(n+M) = s(n) T(n) T(n+1) ... T(n+M-1),
// so the only computation left inside the state feedback loop is one
// Boolean vector-matrix product with a precomputed matrix, whatever M is.
// The prefix products P_k = T(n) ... T(n+k-1), k = 1..M, are built
// incrementally (P_{k+1} = P_k T(n+k)) outside the loop and registered, which
// pipelines them away from the loop. In the loop stage the states inside the
// block are s(n+k) = s(n) P_k (P_0 = I), from which the symbol flags of every
// bit position follow exactly as in the bit-serial machine.
//
// Interface: blk_valid qualifies blk_bits; blk_bits[0] is the earliest bit.
// sym[k] is the one-hot symbol flag of bit position k of the block.
// Timing: one block per clock; sym/sym_valid appear two clocks after the
// block is presented (one precompute stage, one loop stage). Empty clocks
// pass through the pipeline without changing the state.
module huffman_lookahead_decoder
  import huffman_pkg::*;
#(
  parameter int unsigned M = 4           // bits decoded per clock
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          blk_valid,
  input  logic [M-1:0]  blk_bits,
  output logic          sym_valid,
  output hsym_t         sym [M],
  output hstate_t       state
);

  // stage 1: feed-forward look-ahead matrices
  hmat_t        pre_c [M+1];
  hmat_t        pre_q [M+1];
  logic [M-1:0] bits_q;
  logic         v1_q;

  always_comb begin
    pre_c[0] = identity();
    for (int k = 0; k < M; k++) pre_c[k+1] = mat_mat(pre_c[k], t_matrix(blk_bits[k]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      bits_q <= '0;
      for (int k = 0; k <= M; k++) pre_q[k] <= identity();
    end else begin
      v1_q   <= blk_valid;
      bits_q <= blk_bits;
      pre_q  <= pre_c;
    end
  end

  // stage 2: state loop, s(n+M) = s(n) P_M
  hstate_t st_k [M];

  always_comb begin
    for (int k = 0; k < M; k++) st_k[k] = vec_mat(state, pre_q[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S1;
      sym_valid <= 1'b0;
      for (int k = 0; k < M; k++) sym[k] <= '0;
    end else begin
      sym_valid <= v1_q;
      if (v1_q) state <= vec_mat(state, pre_q[M]);
      for (int k = 0; k < M; k++) sym[k] <= v1_q ? symbol_out(st_k[k], bits_q[k]) : '0;
    end
  end

  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));

endmodule
