// fp_round: rounding unit shared by the adder, multiplier and divider.
//
// Takes a normalized significand (hidden 1 at the MSB), the round bit R and
// the sticky bit S, and rounds to nearest even: one is added at the LSB when
// R and (LSB or S). A carry out of the significand (all ones rounded up) is
// renormalized by a one-bit right shift and an exponent increment. The
// exponent is then checked against the format's range: too large gives a
// signed infinity with overflow and inexact, zero or below gives a signed
// zero with underflow and inexact (denormals are not produced; this flush to
// zero is this design's choice). Purely combinational.
module fp_round #(
  parameter int unsigned EW = 8,   // exponent field width
  parameter int unsigned FW = 23   // fraction field width (p - 1)
) (
  input  logic                 sign,
  input  logic signed [EW+1:0] exp,     // biased exponent, may be out of range
  input  logic [FW:0]          sig,     // normalized significand, sig[FW] = 1
  input  logic                 rnd,
  input  logic                 sticky,
  output logic [EW+FW:0]       result,
  output logic                 ovf,
  output logic                 unf,
  output logic                 inx
);
  localparam logic signed [EW+1:0] EMAX = (EW+2)'((1 << EW) - 1);

  logic               inc;
  logic [FW+1:0]      sum;
  logic [FW-1:0]      sig_r;
  logic signed [EW+1:0] exp_r;

  always_comb begin
    inc = rnd & (sig[0] | sticky);
    sum = {1'b0, sig} + (FW+2)'(inc);
    if (sum[FW+1]) begin
      sig_r = sum[FW:1];
      exp_r = exp + 1;
    end else begin
      sig_r = sum[FW-1:0];
      exp_r = exp;
    end
    ovf = 1'b0;
    unf = 1'b0;
    inx = rnd | sticky;
    if (exp_r >= EMAX) begin
      ovf    = 1'b1;
      inx    = 1'b1;
      result = {sign, {EW{1'b1}}, {FW{1'b0}}};
    end else if (exp_r <= 0) begin
      unf    = 1'b1;
      inx    = 1'b1;
      result = {sign, {(EW+FW){1'b0}}};
    end else begin
      result = {sign, exp_r[EW-1:0], sig_r};
    end
  end
endmodule
