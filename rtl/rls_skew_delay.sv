// rls_skew_delay: a DEPTH-stage shift register for wavefront elements. It
// skews column j of the input rows by j processor clocks so that a row
// reaches the triarray as a diagonal wavefront. DEPTH = 0 is a plain wire.
// Registers reset to empty (valid low) elements.
module rls_skew_delay
  import rls_pkg::*;
#(
  parameter int unsigned DEPTH = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  xbus_t d,
  output xbus_t q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    xbus_t sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < DEPTH; k++) sr[k] <= '{valid: 1'b0, mode: ROT_UPDATE, x: '0};
      end else begin
        sr[0] <= d;
        for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
      end
    end
    assign q = sr[DEPTH-1];
  end

endmodule
