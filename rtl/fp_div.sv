// fp_div: IEEE 754 floating-point divider (single precision by default,
// round to nearest even). Combinational.
//
// The quotient sign is the XOR of the signs and the exponent is e1 - e2 plus
// the bias. The significand quotient s1/s2 lies in (0.5, 2); it is produced
// with p+3 bits so that after a possible normalizing left shift by one place
// (exponent - 1) the p result bits are still followed by a round bit. The
// remainder of the division takes part in the sticky bit. The significand
// division itself uses the division operator: no divider algorithm is
// prescribed, so this is the simplest form. Special operands: NaN in gives
// NaN; 0/0 and inf/inf give NaN and invalid; x/0 gives infinity and
// divide-by-zero; inf/x gives infinity; x/inf and 0/x give zero. Denormals
// are read as zero and tiny results flushed to zero (this design's choice).
module fp_div
  import fp_pkg::*;
#(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  output logic [EW+FW:0] result,
  output fp_flags_t      flags
);
  localparam int unsigned P = FW + 1;
  localparam logic signed [EW+1:0] BIAS = (EW+2)'((1 << (EW - 1)) - 1);
  localparam logic [EW+FW:0] QNAN = {1'b0, {EW{1'b1}}, 1'b1, {(FW-1){1'b0}}};

  logic [EW-1:0] ea, eb;
  logic          sign;
  logic          anan, bnan, ainf, binf, azero, bzero;
  logic [2*P+1:0] dividend, quot, rem;
  logic [P-1:0]   sig;
  logic           rnd, sticky;
  logic signed [EW+1:0] e_q;
  logic [EW+FW:0] rounded;
  logic           ovf, unf, inx;

  always_comb begin
    ea    = a[EW+FW-1:FW];
    eb    = b[EW+FW-1:FW];
    sign  = a[EW+FW] ^ b[EW+FW];
    anan  = (&ea) && (a[FW-1:0] != '0);
    bnan  = (&eb) && (b[FW-1:0] != '0);
    ainf  = (&ea) && (a[FW-1:0] == '0);
    binf  = (&eb) && (b[FW-1:0] == '0);
    azero = (ea == '0);
    bzero = (eb == '0);
  end

  // divide significands: quotient scaled by 2^(p+2)
  always_comb begin
    dividend = {1'b1, a[FW-1:0], {(P+2){1'b0}}};
    quot     = dividend / (2*P+2)'({1'b1, b[FW-1:0]});
    rem      = dividend % (2*P+2)'({1'b1, b[FW-1:0]});
  end

  // normalize and adjust the exponent
  always_comb begin
    e_q = (EW+2)'(ea) - (EW+2)'(eb) + BIAS;
    if (quot[P+2]) begin
      sig    = quot[P+2:3];
      rnd    = quot[2];
      sticky = (|quot[1:0]) | (rem != '0);
    end else begin
      sig    = quot[P+1:2];
      rnd    = quot[1];
      sticky = quot[0] | (rem != '0);
      e_q    = e_q - 1;
    end
  end

  fp_round #(.EW(EW), .FW(FW)) u_round (
    .sign(sign), .exp(e_q), .sig(sig), .rnd(rnd), .sticky(sticky),
    .result(rounded), .ovf(ovf), .unf(unf), .inx(inx)
  );

  always_comb begin
    flags = '0;
    if (anan || bnan) begin
      result = QNAN;
    end else if ((azero && bzero) || (ainf && binf)) begin
      result    = QNAN;
      flags.inv = 1'b1;
    end else if (ainf) begin
      result = {sign, {EW{1'b1}}, {FW{1'b0}}};
    end else if (binf || azero) begin
      result = {sign, {(EW+FW){1'b0}}};
    end else if (bzero) begin
      result    = {sign, {EW{1'b1}}, {FW{1'b0}}};
      flags.dbz = 1'b1;
    end else begin
      result    = rounded;
      flags.ovf = ovf;
      flags.unf = unf;
      flags.inx = inx;
    end
  end
endmodule
