// tdp_exp_ctrl: exponent logic and control logic of the triple path adder.
//
// Both IEEE operands are compared by magnitude (exponent field, then
// fraction field); the larger one leaves as x and the smaller as y, with the
// sign of b already inverted for a subtraction. d is the exponent difference
// ex - ey, eff_sub says the signs of x and y differ. The path for the
// significand work is then chosen:
//   bypass (I)  a zero, infinity or NaN operand, or d > p+1, where the
//               smaller operand cannot change the rounded result;
//   LZA (J)     effective subtraction with d = 0 or 1, where massive
//               cancellation needs a leading-zero count and a full left shift;
//   LZB (K)     every other case: full alignment, at most a 1-bit normalize.
// The three-way split follows the adder's block diagram; the exact
// thresholds are this design's choice. A zero exponent field is read as zero
// (denormals are flushed). Combinational.
module tdp_exp_ctrl
  import fp_pkg::*;
#(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  input  logic           sub,
  output logic [EW+FW:0] x,
  output logic [EW+FW:0] y,
  output logic [EW-1:0]  d,
  output logic           eff_sub,
  output tdp_path_t      path
);
  localparam int unsigned P = FW + 1;

  logic [EW+FW:0] be;       // b with the sign of the operation applied
  logic           swap;
  logic           special;

  always_comb begin
    be   = {b[EW+FW] ^ sub, b[EW+FW-1:0]};
    swap = b[EW+FW-1:0] > a[EW+FW-1:0];
    x    = swap ? be : a;
    y    = swap ? a  : be;
    d       = x[EW+FW-1:FW] - y[EW+FW-1:FW];
    eff_sub = x[EW+FW] ^ y[EW+FW];
    special = (&x[EW+FW-1:FW]) | (&y[EW+FW-1:FW]) |
              (x[EW+FW-1:FW] == '0) | (y[EW+FW-1:FW] == '0);
    if (special || d > EW'(P + 1))   path = PATH_I_BP;
    else if (eff_sub && d <= EW'(1)) path = PATH_J_LZA;
    else                             path = PATH_K_LZB;
  end
endmodule
