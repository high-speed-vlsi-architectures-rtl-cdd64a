// rls_dual_state_array: sliding-window recursive least-squares processor
// built around the dual-state systolic triarray.
//
// Each data clock (two processor clocks) one row [x(n+1)^T : y(n+1)] may be
// accepted. The row is written into the per-sensor window buffers and,
// through the selection switches, sent into the triarray as an updating
// (Givens) wavefront; on the following processor clock the row that has
// just left the window, [x(n+1-L)^T : y(n+1-L)], follows as a downdating
// (hyperbolic) wavefront. The input skew turns each row into a diagonal
// wavefront. After every pair the triarray holds [R(n+1) : u(n+1)] of the
// last L rows, and the residual multiplier delivers, per wavefront,
//   update:   e_u1(n+1) = -prod(c_i)  * v1(n+1)  (residual of x(n+1) on a window of L+1 rows)
//   downdate: e_2(n+1)  = -prod(c~_i) * v2(n+1)  (residual of x(n+1-L) on the new window)
// While fewer than L rows have entered, the downdating slots are empty and
// no downdate residual is produced.
//
// Interface: in_x / in_y with in_valid/in_ready; a row is taken when both are
// high (in_ready is high every other clock). clear empties R (call it only
// when no rows are in flight; the window buffers restart from reset only).
// Timing: the update residual of a row appears LATENCY = 2P+2 processor
// clocks after it was accepted, the downdate residual one clock later.
// Number format: rls_pkg (Q15.16 by default); inputs are expected to stay
// well inside +-1.0 so that R and the rotation parameters do not overflow.
// r_mat is the full P x (P+1) array for easy indexing; its entries below the
// diagonal are constant zero.
//
// The structure (window buffers, selection switches, skew, dual-state
// triarray, residual multiplier) follows the architecture; the handshake,
// empty slots while the window fills, clear, and the sizes P = 4, L = 16
// are choices of this design.
module rls_dual_state_array
  import rls_pkg::*;
#(
  parameter int unsigned P = 4,      // order p
  parameter int unsigned L = 16      // window size l
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      in_valid,
  output logic      in_ready,
  input  fx_t       in_x [P],
  input  fx_t       in_y,
  output logic      e_valid,
  output rot_mode_e e_mode,
  output fx_t       e_out,
  output logic      dd_fail,
  output fx_t       r_mat [P][P+1]
);

  logic                 accept, phase, old_valid;
  logic [$clog2(L)-1:0] wr_addr;
  fx_t                  new_col [P+1];
  fx_t                  old_col [P+1];
  xbus_t                sw_out  [P+1];
  xbus_t                skewed  [P+1];
  xbus_t                v_bot;
  fx_t                  gamma_bot;
  logic                 fail_vec [P];

  rls_frontend_ctrl #(.L(L)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .accept    (accept),
    .phase     (phase),
    .wr_addr   (wr_addr),
    .old_valid (old_valid)
  );

  for (genvar j = 0; j <= P; j++) begin : g_col
    if (j < P) begin : g_x
      assign new_col[j] = in_x[j];
    end else begin : g_y
      assign new_col[j] = in_y;
    end

    rls_window_buffer #(.L(L)) u_buf (
      .clk      (clk),
      .push     (accept),
      .addr     (wr_addr),
      .new_data (new_col[j]),
      .old_data (old_col[j])
    );

    rls_select_switch u_sw (
      .clk       (clk),
      .rst_n     (rst_n),
      .accept    (accept),
      .phase     (phase),
      .old_valid (old_valid),
      .new_data  (new_col[j]),
      .old_data  (old_col[j]),
      .x_out     (sw_out[j])
    );

    rls_skew_delay #(.DEPTH(j)) u_skew (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (sw_out[j]),
      .q     (skewed[j])
    );
  end

  rls_triarray #(.P(P)) u_arr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .col_in    (skewed),
    .v_out     (v_bot),
    .gamma_out (gamma_bot),
    .dd_fail   (fail_vec),
    .r_mat     (r_mat)
  );

  rls_residual_cell u_res (
    .clk      (clk),
    .rst_n    (rst_n),
    .v_in     (v_bot),
    .gamma_in (gamma_bot),
    .e_valid  (e_valid),
    .e_mode   (e_mode),
    .e_out    (e_out)
  );

  always_comb begin
    dd_fail = 1'b0;
    for (int i = 0; i < P; i++) dd_fail |= fail_vec[i];
  end

endmodule
