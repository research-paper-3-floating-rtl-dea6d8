// fp_pkg: types shared by the floating-point units.
//
// fp_flags_t holds the five IEEE 754 exception flags. Their order inside the
// 5-bit flag word (overflow at bit 4 down to inexact at bit 0) follows the
// order in which the exceptions are usually listed; it is this design's choice.
// tdp_path_t names the three paths of the triple path adder. The encodings
// I, J and K are the state names of its path state machine: I is the bypass
// path, J the leading-zero (LZA, close) path, K the far (LZB) path.
// rmode_t is the rounding mode of the compound adder.
package fp_pkg;

  typedef struct packed {
    logic ovf;  // overflow
    logic unf;  // underflow
    logic dbz;  // divide by zero
    logic inv;  // invalid operation
    logic inx;  // inexact
  } fp_flags_t;

  typedef enum logic [1:0] {
    PATH_I_BP  = 2'd0,  // bypass path
    PATH_J_LZA = 2'd1,  // close path with leading-zero count
    PATH_K_LZB = 2'd2   // far path, at most a 1-bit normalization
  } tdp_path_t;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'd0,
    RM_TOWARD_ZERO  = 2'd1,
    RM_TOWARD_POS   = 2'd2,
    RM_TOWARD_NEG   = 2'd3
  } rmode_t;

endpackage
