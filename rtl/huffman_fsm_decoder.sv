// huffman_fsm_decoder: bit-serial Huffman decoder for the five-symbol code
// a:0, b:10, c:110, d:1111, e:1110, written as the four-state machine
// s(n+1) = s(n) T(x(n)) of huffman_pkg.
//
// One code bit x(n) is read per clock. The five outputs a..e are one-hot
// presence flags: the flag of a symbol is high in the clock in which the
// last bit of its code word is read (a Mealy output of the current state
// and the current bit); otherwise all are low. After every code word the
// machine is back in S1.
//
// Interface: bit_valid qualifies bit_in; when it is low the state holds and
// no symbol is flagged (a choice of this design, as is the synchronous
// active-low reset to S1).
module huffman_fsm_decoder
  import huffman_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    bit_valid,
  input  logic    bit_in,
  output hsym_t   sym,
  output hstate_t state
);

  always_ff @(posedge clk) begin
    if (!rst_n)         state <= S1;
    else if (bit_valid) state <= vec_mat(state, t_matrix(bit_in));
  end

  assign sym = bit_valid ? symbol_out(state, bit_in) : '0;

  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));

endmodule
