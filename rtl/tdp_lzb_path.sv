// tdp_lzb_path: far (LZB) path of the triple path adder.
//
// Serves effective additions and effective subtractions whose exponent
// difference d is above 1. The smaller significand is aligned by the right
// barrel shifter, keeping guard, round and sticky bits (p+3 bits), then added
// to or subtracted from the larger one. The result needs at most a one-bit
// normalization: right on a carry out (exponent + 1), left when the leading
// one fell one place (exponent - 1, only after a subtraction). The rounding
// unit rounds to nearest even and checks the exponent range.
// Combinational.
module tdp_lzb_path
  import fp_pkg::*;
#(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] x,        // larger operand
  input  logic [EW+FW:0] y,        // smaller operand, effective sign
  input  logic [EW-1:0]  d,        // exponent difference
  input  logic           eff_sub,
  output logic [EW+FW:0] result,
  output fp_flags_t      flags
);
  localparam int unsigned P  = FW + 1;
  localparam int unsigned SW = $clog2(P + 2);

  logic [P-1:0]  mx, my, c;
  logic          g, r, s;
  logic [SW-1:0] sh;
  logic [P+3:0]  opx, opy, sum;
  logic [P-1:0]  sig;
  logic          rnd, sticky;
  logic signed [EW+1:0] e;
  logic          ovf, unf, inx;

  assign mx = {1'b1, x[FW-1:0]};
  assign my = {1'b1, y[FW-1:0]};
  assign sh = (d > EW'(P + 1)) ? SW'(P + 2) : SW'(d);

  rshift_grs #(.W(P), .SW(SW)) u_align (
    .a(my), .sh(sh), .c(c), .g(g), .r(r), .s(s)
  );

  always_comb begin
    opx = {1'b0, mx, 3'b000};
    opy = {1'b0, c, g, r, s};
    sum = eff_sub ? (opx - opy) : (opx + opy);
    e   = (EW+2)'(x[EW+FW-1:FW]);
    if (sum[P+3]) begin                    // carry out: 1-bit right shift
      sig    = sum[P+3:4];
      rnd    = sum[3];
      sticky = |sum[2:0];
      e      = e + 1;
    end else if (sum[P+2]) begin           // already normalized
      sig    = sum[P+2:3];
      rnd    = sum[2];
      sticky = |sum[1:0];
    end else begin                         // 1-bit left shift
      sig    = sum[P+1:2];
      rnd    = sum[1];
      sticky = sum[0];
      e      = e - 1;
    end
  end

  fp_round #(.EW(EW), .FW(FW)) u_round (
    .sign(x[EW+FW]), .exp(e), .sig(sig), .rnd(rnd), .sticky(sticky),
    .result(result), .ovf(ovf), .unf(unf), .inx(inx)
  );

  always_comb begin
    flags     = '0;
    flags.ovf = ovf;
    flags.unf = unf;
    flags.inx = inx;
  end
endmodule
