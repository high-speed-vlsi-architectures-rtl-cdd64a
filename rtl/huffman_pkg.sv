// huffman_pkg: types and the transition matrix of the example five-symbol
// Huffman decoder (code a:0, b:10, c:110, d:1111, e:1110).
//
// The decoder is a four-state machine with one-hot state row vector
// s(n) = [s1 s2 s3 s4] and update s(n+1) = s(n) T(x(n)), where, for input
// bit x,
//        | ~x  x  0  0 |
//   T =  | ~x  0  x  0 |
//        | ~x  0  0  x |
//        |  1  0  0  0 |
// Vector-matrix and matrix-matrix products are Boolean (AND for product,
// OR for sum). S1 is the root of the code tree; S2, S3, S4 follow the
// prefixes 1, 11, 111.
package huffman_pkg;

  typedef logic [3:0] hstate_t;            // one-hot, bit k-1 = S_k
  typedef logic [3:0] hrow_t;
  typedef hrow_t      hmat_t [4];          // hmat_t[row][col]

  // one-hot symbol outputs for one bit position
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
    logic e;
  } hsym_t;

  localparam hstate_t S1 = 4'b0001;

  function automatic hmat_t t_matrix(logic x);
    hmat_t t;
    t[0] = {1'b0, 1'b0, x,    ~x};
    t[1] = {1'b0, x,    1'b0, ~x};
    t[2] = {x,    1'b0, 1'b0, ~x};
    t[3] = {1'b0, 1'b0, 1'b0, 1'b1};
    return t;
  endfunction

  // s * M (Boolean)
  function automatic hstate_t vec_mat(hstate_t s, hmat_t m);
    hstate_t r;
    r = '0;
    for (int i = 0; i < 4; i++) if (s[i]) r |= m[i];
    return r;
  endfunction

  // A * B (Boolean)
  function automatic hmat_t mat_mat(hmat_t a, hmat_t b);
    hmat_t r;
    for (int i = 0; i < 4; i++) r[i] = vec_mat(a[i], b);
    return r;
  endfunction

  function automatic hmat_t identity();
    hmat_t r;
    for (int i = 0; i < 4; i++) r[i] = hrow_t'(1) << i;
    return r;
  endfunction

  // symbol detected in the cycle where the machine is in state s and reads x
  function automatic hsym_t symbol_out(hstate_t s, logic x);
    hsym_t o;
    o.a = s[0] & ~x;
    o.b = s[1] & ~x;
    o.c = s[2] & ~x;
    o.d = s[3] &  x;
    o.e = s[3] & ~x;
    return o;
  endfunction

endpackage
