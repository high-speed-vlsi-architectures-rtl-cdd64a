// rls_window_buffer: queuing buffer of one sensor (one column of [X : y]).
//
// Every sample that enters the array for updating is also written here and
// stays for L data clocks, after which it is presented again for downdating.
// The buffer is a circular memory of L words addressed by a write pointer
// shared by all columns (rls_frontend_ctrl). The read is read-before-write at
// the write address: while sample x(n+1) is written, old_data shows the word
// it overwrites, which is x(n+1-L), the sample that leaves the window.
//
// The per-sensor buffer of window length follows the architecture; building
// it as a read-before-write circular memory with a shared pointer is this
// design's choice. The memory is not reset: a word is only used after it has
// been written (rls_frontend_ctrl tracks that).
//
// Timing: write on the clock edge when push is high; old_data is
// combinational from the memory and the address.
module rls_window_buffer
  import rls_pkg::*;
#(
  parameter int unsigned L = 16          // window size l
) (
  input  logic                 clk,
  input  logic                 push,
  input  logic [$clog2(L)-1:0] addr,
  input  fx_t                  new_data,
  output fx_t                  old_data
);

  fx_t mem [L];

  always_ff @(posedge clk) begin
    if (push) mem[addr] <= new_data;
  end

  assign old_data = mem[addr];

endmodule
