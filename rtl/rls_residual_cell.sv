// rls_residual_cell: multiplier cell below the last column of the triarray.
//
// It forms the newest optimal residual from the two quantities the array
// delivers for each wavefront: v, the rotated desired-response element that
// leaves the bottom of the y column, and gamma, the product of the cosines
// of all diagonal cells for that wavefront:
//   update wavefront:   e_u1 = -prod(c_i)  * v1
//   downdate wavefront: e_2  = -prod(c~_i) * v2
// The mode bit of v tells which of the two residuals it is.
//
// The formula follows the residual extraction of the architecture; the
// output register is a choice of this design.
//
// Timing: one register stage; e_out follows v_in by one processor clock.
// gamma_in must arrive in the same clock as v_in.
module rls_residual_cell
  import rls_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  xbus_t     v_in,
  input  fx_t       gamma_in,
  output logic      e_valid,
  output rot_mode_e e_mode,
  output fx_t       e_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0;
      e_mode  <= ROT_UPDATE;
      e_out   <= '0;
    end else begin
      e_valid <= v_in.valid;
      e_mode  <= v_in.mode;
      e_out   <= -fx_mul(gamma_in, v_in.x);
    end
  end

endmodule
