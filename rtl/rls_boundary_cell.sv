// rls_boundary_cell: diagonal processor of the dual-state systolic triarray.
//
// The cell stores one diagonal element r of the Cholesky factor R. Each
// processor clock it takes one data element x from above. For an updating
// element it generates the Givens rotation that zeroes x against r:
//   r' = sqrt(r^2 + x^2),  c = r/r',  s = x/r'
// and for a downdating element the hyperbolic rotation
//   r' = sqrt(r^2 - x^2),  c = r/r',  s = x/r'.
// (c, s) and the mode bit leave to the right for the rest of the row. The
// cell also multiplies the running product gamma of the cosines arriving from
// the previous diagonal cell by its own c, so that the last cell delivers
// prod(c_i) (update) or prod(c~_i) (downdate) for the residual multiplier.
//
// Choices of this design: when r' would be zero the cell passes the identity
// rotation (c = 1, s = 0); when r^2 - x^2 <= 0 a downdate is impossible, the
// cell keeps r, passes the identity rotation and raises dd_fail for that
// cycle. An invalid (empty) element also passes the identity rotation and
// leaves r alone. clear zeroes r synchronously.
//
// Timing: all outputs are registered, one processor clock after the inputs.
module rls_boundary_cell
  import rls_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  xbus_t x_in,        // element from the cell above (or the input skew)
  input  fx_t   gamma_in,    // running cosine product from the previous diagonal cell
  output rot_t  rot_out,     // rotation parameters to the right
  output fx_t   gamma_out,   // gamma_in * c, registered
  output logic  dd_fail,     // downdate could not be performed (registered)
  output fx_t   r_out        // stored element of R
);

  fx_t  r_q;
  fx2_t r2, x2, arg;
  fx_t  rn, c_n, s_n, r_n;
  logic fail_n;

  always_comb begin
    r2     = fx2_t'(r_q) * fx2_t'(r_q);
    x2     = fx2_t'(x_in.x) * fx2_t'(x_in.x);
    arg    = (x_in.mode == ROT_UPDATE) ? r2 + x2 : r2 - x2;
    rn     = '0;
    c_n    = FX_ONE;
    s_n    = '0;
    r_n    = r_q;
    fail_n = 1'b0;
    if (x_in.valid) begin
      if (arg <= 0) begin
        // zero norm (update of an all-zero row) or impossible downdate
        fail_n = (x_in.mode == ROT_DOWNDATE) && (x2 != 0);
      end else begin
        rn  = fx_isqrt(arg);
        if (rn == 0) begin
          r_n = '0;
        end else begin
          c_n = fx_div(r_q, rn);
          s_n = fx_div(x_in.x, rn);
          r_n = rn;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q       <= '0;
      rot_out   <= '{valid: 1'b0, mode: ROT_UPDATE, c: FX_ONE, s: '0};
      gamma_out <= FX_ONE;
      dd_fail   <= 1'b0;
    end else begin
      r_q       <= clear ? '0 : r_n;
      rot_out   <= '{valid: x_in.valid, mode: x_in.mode, c: c_n, s: s_n};
      gamma_out <= fx_mul(gamma_in, c_n);
      dd_fail   <= fail_n;
    end
  end

  assign r_out = r_q;

endmodule
