// rls_internal_cell: off-diagonal processor of the dual-state systolic
// triarray.
//
// The cell stores one element r of [R : u]. It applies the rotation (c, s)
// generated by the diagonal cell of its row to the pair (r, x), where x is the
// element arriving from above:
//   update   (Givens):     r' = c*r + s*x,   x' = -s*r + c*x
//   downdate (hyperbolic): r' = c*r - s*x,   x' = -s*r + c*x
// The rotated x' goes down to the next row, (c, s) and the mode bit go on to
// the right. The mode travels with the rotation, so one control bit decides
// the processor state on every clock. An empty slot leaves r alone.
//
// Timing: x_out and rot_out are registered, one processor clock after the
// inputs. clear zeroes r synchronously.
module rls_internal_cell
  import rls_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  xbus_t x_in,      // element from the cell above
  input  rot_t  rot_in,    // rotation from the cell on the left
  output xbus_t x_out,     // rotated element to the cell below
  output rot_t  rot_out,   // rotation to the cell on the right
  output fx_t   r_out      // stored element
);

  fx_t r_q, r_n, x_n;
  fx_t cr, sx, sr, cx;

  always_comb begin
    cr  = fx_mul(rot_in.c, r_q);
    sx  = fx_mul(rot_in.s, x_in.x);
    sr  = fx_mul(rot_in.s, r_q);
    cx  = fx_mul(rot_in.c, x_in.x);
    x_n = cx - sr;
    r_n = (rot_in.mode == ROT_UPDATE) ? cr + sx : cr - sx;
    if (!rot_in.valid) begin
      r_n = r_q;
      x_n = x_in.x;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q     <= '0;
      x_out   <= '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
      rot_out <= '{valid: 1'b0, mode: ROT_UPDATE, c: FX_ONE, s: '0};
    end else begin
      r_q     <= clear ? '0 : r_n;
      x_out   <= '{valid: x_in.valid, mode: rot_in.mode, x: x_n};
      rot_out <= rot_in;
    end
  end

  assign r_out = r_q;

endmodule
