// rls_pkg: number format, bus types and arithmetic shared by the dual-state
// systolic up/downdating RLS array.
//
// All array data are signed two's-complement fixed point, FX_W bits wide with
// FX_F fraction bits (default Q15.16). The format is a choice of this design;
// the rotation formulas themselves (Givens for updating, hyperbolic for
// downdating) follow the up/downdating algorithm. A wavefront element carries
// one control bit, the rotation mode, plus a valid flag for empty slots.
package rls_pkg;

  parameter int unsigned FX_W = 32;   // word width of every array operand
  parameter int unsigned FX_F = 16;   // fraction bits

  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [2*FX_W-1:0] fx2_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_F;

  // The single control bit that selects the processor state.
  typedef enum logic {
    ROT_UPDATE   = 1'b0,   // Givens rotation   (black circle)
    ROT_DOWNDATE = 1'b1    // hyperbolic rotation (white circle)
  } rot_mode_e;

  // Data element travelling down a column of the triarray.
  typedef struct packed {
    logic      valid;
    rot_mode_e mode;
    fx_t       x;
  } xbus_t;

  // Rotation parameters travelling right along a row of the triarray.
  typedef struct packed {
    logic      valid;
    rot_mode_e mode;
    fx_t       c;
    fx_t       s;
  } rot_t;

  // Fixed-point product with round-to-nearest.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    fx2_t p;
    p = fx2_t'(a) * fx2_t'(b);
    p = p + (fx2_t'(1) <<< (FX_F - 1));
    return fx_t'(p >>> FX_F);
  endfunction

  // Fixed-point quotient a/b (b must be non-zero), truncated toward zero.
  function automatic fx_t fx_div(fx_t a, fx_t b);
    fx2_t n;
    n = fx2_t'(a) <<< FX_F;
    return fx_t'(n / fx2_t'(b));
  endfunction

  // Integer square root (floor) of a non-negative double-width value, bit by
  // bit. Applied to a value with 2*FX_F fraction bits it returns FX_F bits.
  function automatic fx_t fx_isqrt(fx2_t v);
    logic [2*FX_W-1:0] rem;
    logic [FX_W-1:0]   root;
    logic [FX_W-1:0]   trial;
    rem  = v;
    root = '0;
    for (int i = FX_W - 1; i >= 0; i--) begin
      trial = root | (FX_W'(1) << i);
      if ((2*FX_W)'(trial) * (2*FX_W)'(trial) <= rem) root = trial;
    end
    return fx_t'(root);
  endfunction

endpackage
