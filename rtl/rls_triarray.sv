// rls_triarray: dual-state systolic triarray for joint up/downdating of the
// QR factor [R : u] of a sliding-window least-squares problem.
//
// P rows of processors. Row i holds a diagonal (boundary) cell at column i
// and internal cells at columns i+1 .. P; column P holds the right-hand side
// u. Data elements move down, rotation parameters move right, each through
// one register per cell, so cell (i,j) works on a wavefront i+j clocks after
// the wavefront reached cell (0,0). Updating (Givens) and downdating
// (hyperbolic) wavefronts follow each other on alternate clocks; because the
// mode bit travels with the data, every processor flips between the two
// states from clock to clock, and horizontal or vertical neighbours are
// always in opposite states (checked by assertions).
//
// Along the diagonal the running product of the cosines is passed from
// boundary cell to boundary cell through one extra register, so it meets
// the element leaving the bottom of the u column; the residual multiplier
// then forms e = -gamma * v.
//
// The cell types, the data flow and the alternation follow the architecture;
// the exact register placement (one per cell, one extra on the diagonal
// gamma path) is this design's choice.
//
// Interface: col_in[j] must already be skewed by j clocks. v_out / gamma_out
// belong to the wavefront that entered cell (0,0) 2P clocks earlier. r_mat
// gives the stored [R : u] (entries below the diagonal are zero).
module rls_triarray
  import rls_pkg::*;
#(
  parameter int unsigned P = 4       // order p (columns of X)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  xbus_t col_in  [P+1],
  output xbus_t v_out,
  output fx_t   gamma_out,
  output logic  dd_fail  [P],
  output fx_t   r_mat    [P][P+1]
);

  // xw[i][j]: element entering row i at column j (from above)
  // rw[i][j]: rotation entering cell (i,j) from the left (j > i)
  xbus_t xw [P+1][P+1];
  rot_t  rw [P][P+2];
  fx_t   gam_in  [P];
  fx_t   gam_out [P];
  fx_t   gam_dly [P];

  for (genvar j = 0; j <= P; j++) begin : g_top
    assign xw[0][j] = col_in[j];
  end

  for (genvar i = 0; i < P; i++) begin : g_row
    assign gam_in[i] = (i == 0) ? FX_ONE : gam_dly[i-1];

    rls_boundary_cell u_bnd (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (clear),
      .x_in      (xw[i][i]),
      .gamma_in  (gam_in[i]),
      .rot_out   (rw[i][i+1]),
      .gamma_out (gam_out[i]),
      .dd_fail   (dd_fail[i]),
      .r_out     (r_mat[i][i])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) gam_dly[i] <= FX_ONE;
      else        gam_dly[i] <= gam_out[i];
    end

    for (genvar j = 0; j < P + 1; j++) begin : g_col
      if (j < i) begin : g_zero
        assign r_mat[i][j] = '0;
        assign xw[i+1][j]  = '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
      end else if (j == i) begin : g_diag
        // the boundary cell annihilates its element: nothing goes down
        assign xw[i+1][j]  = '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
      end else if (j > i) begin : g_int
        rls_internal_cell u_int (
          .clk     (clk),
          .rst_n   (rst_n),
          .clear   (clear),
          .x_in    (xw[i][j]),
          .rot_in  (rw[i][j]),
          .x_out   (xw[i+1][j]),
          .rot_out (rw[i][j+1]),
          .r_out   (r_mat[i][j])
        );
        // spatial duality: horizontal neighbours work in opposite states
        if (j < P) begin : g_dual
          a_dual : assert property (@(posedge clk) disable iff (!rst_n)
            (rw[i][j].valid && rw[i][j+1].valid) |-> (rw[i][j].mode != rw[i][j+1].mode));
        end
        // ... and so do vertical neighbours
        if (i + 1 < P) begin : g_dual_v
          a_dual_v : assert property (@(posedge clk) disable iff (!rst_n)
            (xw[i][j].valid && xw[i+1][j].valid) |-> (xw[i][j].mode != xw[i+1][j].mode));
        end
      end
    end
  end

  assign v_out     = xw[P][P];
  assign gamma_out = gam_dly[P-1];

endmodule
