// rls_select_switch: selection switch at the top of one column.
//
// At an accepted row the switch captures the new sample and the sample that
// leaves the window (from the column's window buffer). It then offers, one
// processor clock each, the new sample tagged for updating (phase 1) and the
// old sample tagged for downdating (next phase 0). The mode bit therefore
// alternates every clock, and empty slots (no new row, or window not yet
// full) go out with valid low but the same alternating mode.
//
// Alternating new and old samples follows the architecture; the capture
// registers, the valid flag and placing the switch ahead of the skew are
// choices of this design.
//
// Timing: the captured samples are registered at the accept edge; x_out is a
// mux of those registers selected by phase.
module rls_select_switch
  import rls_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  accept,
  input  logic  phase,
  input  logic  old_valid,
  input  fx_t   new_data,
  input  fx_t   old_data,
  output xbus_t x_out
);

  fx_t  new_q, old_q;
  logic new_v, old_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      new_q <= '0;
      old_q <= '0;
      new_v <= 1'b0;
      old_v <= 1'b0;
    end else if (!phase) begin
      // phase 0: a new data clock begins
      new_v <= accept;
      old_v <= accept && old_valid;
      if (accept) begin
        new_q <= new_data;
        old_q <= old_data;
      end
    end
  end

  always_comb begin
    if (phase) x_out = '{valid: new_v, mode: ROT_UPDATE,   x: new_q};
    else       x_out = '{valid: old_v, mode: ROT_DOWNDATE, x: old_q};
  end

endmodule
