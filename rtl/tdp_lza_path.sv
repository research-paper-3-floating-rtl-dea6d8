// tdp_lza_path: close (LZA) path of the triple path adder.
//
// Serves effective subtractions with exponent difference d of 0 or 1. The
// smaller significand is pre-aligned by a 0/1-bit right shift into p+1 bits,
// subtracted from the larger one (never negative, the operands are ordered),
// the leading zeros of the difference are counted and the left barrel shifter
// normalizes it while the exponent subtractor takes the count off the
// exponent. Only one bit can have been shifted out, so rounding matters only
// when no left shift follows. An exact zero difference gives +0.
// Combinational.
module tdp_lza_path
  import fp_pkg::*;
#(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] x,        // larger operand
  input  logic [EW+FW:0] y,        // smaller operand
  input  logic           d1,       // exponent difference is 1 (else 0)
  output logic [EW+FW:0] result,
  output fp_flags_t      flags
);
  localparam int unsigned P  = FW + 1;
  localparam int unsigned CW = $clog2(P + 2);

  logic [P:0]    opx, opy, diff, norm;
  logic [CW-1:0] lz;
  logic signed [EW+1:0] e;
  logic [EW+FW:0] rounded;
  logic          ovf, unf, inx;

  always_comb begin
    opx  = {1'b1, x[FW-1:0], 1'b0};
    opy  = d1 ? {2'b01, y[FW-1:0]} : {1'b1, y[FW-1:0], 1'b0};
    diff = opx - opy;
  end

  lzc #(.W(P + 1), .CW(CW)) u_lzc (.x(diff), .cnt(lz));

  norm_shifter #(.W(P + 1), .SW(CW)) u_norm (.a(diff), .sel(lz), .y(norm));

  assign e = (EW+2)'(x[EW+FW-1:FW]) - (EW+2)'(lz);

  fp_round #(.EW(EW), .FW(FW)) u_round (
    .sign(x[EW+FW]), .exp(e), .sig(norm[P:1]), .rnd(norm[0]), .sticky(1'b0),
    .result(rounded), .ovf(ovf), .unf(unf), .inx(inx)
  );

  always_comb begin
    flags = '0;
    if (diff == '0) begin
      result = '0;
    end else begin
      result    = rounded;
      flags.ovf = ovf;
      flags.unf = unf;
      flags.inx = inx;
    end
  end
endmodule
