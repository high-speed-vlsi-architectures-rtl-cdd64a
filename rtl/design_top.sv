// design_top: the two independent designs side by side, each with its own
// ports.
//
//  * RLS section: rls_dual_state_array, a sliding-window recursive
//    least-squares processor on a dual-state systolic triarray (order P,
//    window L). Rows [x^T : y] go in at one per two clocks, optimal
//    residuals and the factor [R : u] come out.
//  * Huffman section: the bit-serial four-state decoder of the example
//    five-symbol code, its look-ahead pipelined version (one bit per clock,
//    M registers in the state loop) and its look-ahead block version that
//    decodes M bits per clock. Each is fed from its own input ports.
//
// Putting the designs side by side is a choice of this design; they share
// no data. All sections share clk and the active-low reset rst_n. See the individual
// modules for interfaces and timing.
module design_top
  import rls_pkg::*;
  import huffman_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned L = 16,
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // RLS section
  input  logic         rls_clear,
  input  logic         rls_in_valid,
  output logic         rls_in_ready,
  input  fx_t          rls_in_x [P],
  input  fx_t          rls_in_y,
  output logic         rls_e_valid,
  output rot_mode_e    rls_e_mode,
  output fx_t          rls_e_out,
  output logic         rls_dd_fail,
  output fx_t          rls_r_mat [P][P+1],
  // bit-serial Huffman decoder
  input  logic         hs_bit_valid,
  input  logic         hs_bit,
  output hsym_t        hs_sym,
  output hstate_t      hs_state,
  // look-ahead pipelined Huffman decoder
  input  logic         hp_bit_valid,
  input  logic         hp_bit,
  output logic         hp_sym_valid,
  output hsym_t        hp_sym,
  // look-ahead block Huffman decoder
  input  logic         hb_blk_valid,
  input  logic [M-1:0] hb_blk_bits,
  output logic         hb_sym_valid,
  output hsym_t        hb_sym [M],
  output hstate_t      hb_state
);

  rls_dual_state_array #(.P(P), .L(L)) u_rls (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (rls_clear),
    .in_valid (rls_in_valid),
    .in_ready (rls_in_ready),
    .in_x     (rls_in_x),
    .in_y     (rls_in_y),
    .e_valid  (rls_e_valid),
    .e_mode   (rls_e_mode),
    .e_out    (rls_e_out),
    .dd_fail  (rls_dd_fail),
    .r_mat    (rls_r_mat)
  );

  huffman_fsm_decoder u_hs (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (hs_bit_valid),
    .bit_in    (hs_bit),
    .sym       (hs_sym),
    .state     (hs_state)
  );

  huffman_pipelined_decoder #(.M(M)) u_hp (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (hp_bit_valid),
    .bit_in    (hp_bit),
    .sym_valid (hp_sym_valid),
    .sym       (hp_sym)
  );

  huffman_lookahead_decoder #(.M(M)) u_hb (
    .clk       (clk),
    .rst_n     (rst_n),
    .blk_valid (hb_blk_valid),
    .blk_bits  (hb_blk_bits),
    .sym_valid (hb_sym_valid),
    .sym       (hb_sym),
    .state     (hb_state)
  );

endmodule
