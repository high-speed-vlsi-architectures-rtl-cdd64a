// rls_frontend_ctrl: data-clock sequencer in front of the triarray.
//
// The processors run at twice the data rate. This controller divides the
// processor clock into data clocks of two phases: in phase 0 a new row of
// [X : y] may be accepted (in_ready), in phase 1 the row accepted in the
// previous phase 0 is sent as an updating wavefront, and in the next phase 0
// the row that left the window is sent as a downdating wavefront. It owns the
// write pointer of the L-deep window buffers and counts how many rows have
// entered; until L rows are in, there is nothing to downdate and the
// downdating slot stays empty.
//
// The two processor clocks per data clock follow the architecture; the
// valid/ready handshake and the fill counter are choices of this design.
//
// Timing: phase toggles every clock after reset (first cycle is phase 0).
// accept = in_valid & in_ready. old_valid is high at an accept when the word
// being overwritten is a real sample of the window.
module rls_frontend_ctrl #(
  parameter int unsigned L = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 accept,
  output logic                 phase,      // 0: downdate slot out / accept, 1: update slot out
  output logic [$clog2(L)-1:0] wr_addr,
  output logic                 old_valid
);

  logic [$clog2(L+1)-1:0] fill_q;

  assign in_ready  = (phase == 1'b0);
  assign accept    = in_valid && in_ready;
  assign old_valid = (fill_q == ($clog2(L+1))'(L));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      wr_addr <= '0;
      fill_q  <= '0;
    end else begin
      phase <= ~phase;
      if (accept) begin
        wr_addr <= (wr_addr == ($clog2(L))'(L - 1)) ? '0 : wr_addr + 1'b1;
        if (!old_valid) fill_q <= fill_q + 1'b1;
      end
    end
  end

endmodule
