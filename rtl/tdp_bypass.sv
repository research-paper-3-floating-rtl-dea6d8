// tdp_bypass: bypass logic of the triple path adder.
//
// Produces the sum without any significand arithmetic for the cases the
// control logic sends here. x is the operand of larger magnitude and y the
// smaller, signs already effective. A NaN operand gives the quiet NaN;
// infinity minus infinity gives the quiet NaN and the invalid flag; another
// infinity is passed through; two zeros give +0 unless both are -0 (round to
// nearest); a zero y passes x; otherwise y is too small to reach the rounding
// position and x is returned with the inexact flag. Exponent fields of zero
// are read as zero (flush to zero). Combinational.
module tdp_bypass
  import fp_pkg::*;
#(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] x,
  input  logic [EW+FW:0] y,
  output logic [EW+FW:0] result,
  output fp_flags_t      flags
);
  localparam logic [EW+FW:0] QNAN = {1'b0, {EW{1'b1}}, 1'b1, {(FW-1){1'b0}}};

  logic [EW-1:0] ex, ey;
  logic          xnan, ynan, xinf, yinf, xzero, yzero;

  always_comb begin
    ex    = x[EW+FW-1:FW];
    ey    = y[EW+FW-1:FW];
    xnan  = (&ex) && (x[FW-1:0] != '0);
    ynan  = (&ey) && (y[FW-1:0] != '0);
    xinf  = (&ex) && (x[FW-1:0] == '0);
    yinf  = (&ey) && (y[FW-1:0] == '0);
    xzero = (ex == '0);
    yzero = (ey == '0);
    flags = '0;
    if (xnan || ynan) begin
      result = QNAN;
    end else if (xinf && yinf && (x[EW+FW] != y[EW+FW])) begin
      result    = QNAN;
      flags.inv = 1'b1;
    end else if (xinf) begin
      result = x;
    end else if (yinf) begin
      result = y;
    end else if (xzero) begin
      result = {x[EW+FW] & y[EW+FW], {(EW+FW){1'b0}}};
    end else if (yzero) begin
      result = x;
    end else begin
      result    = x;
      flags.inx = 1'b1;
    end
  end
endmodule
