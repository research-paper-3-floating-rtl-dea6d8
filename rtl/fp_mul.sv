// fp_mul: single data path IEEE 754 floating-point multiplier (single
// precision by default, round to nearest even). Combinational.
//
// Exponent & sign logic: the biased exponents are added and the bias taken
// off once; the sign is the XOR of the operand signs. Significand multiplier:
// the two p-bit significands (hidden 1 restored) give a 2p-bit product in
// [1, 4). Normalization: when the product MSB is set the product is taken one
// place lower and the exponent incremented. Rounding: one is added at the LSB
// when R and (LSB or S), S being the OR of every bit below R; a carry out of
// the rounding is corrected by a one-bit shift (the correction shift). Result
// flags logic and the result selector then pick the IEEE product or the
// answer for special operands: NaN in gives NaN; zero times infinity gives
// NaN and the invalid flag; infinity gives infinity; zero gives zero.
// Denormal operands are read as zero and tiny results are flushed to zero
// (this design's choice). Flags are {overflow, underflow, divide-by-zero,
// invalid, inexact}.
module fp_mul
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
  logic signed [EW+1:0] e_sum, e_norm;
  logic [2*P-1:0] prod;
  logic [P-1:0]   sig;
  logic           rnd, sticky;
  logic [EW+FW:0] rounded;
  logic           ovf, unf, inx;

  // exponent & sign logic, special operand detection
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
    e_sum = (EW+2)'(ea) + (EW+2)'(eb) - BIAS;
  end

  // significand multiplier
  assign prod = {1'b1, a[FW-1:0]} * {1'b1, b[FW-1:0]};

  // normalization logic
  always_comb begin
    if (prod[2*P-1]) begin
      sig    = prod[2*P-1:P];
      rnd    = prod[P-1];
      sticky = |prod[P-2:0];
      e_norm = e_sum + 1;
    end else begin
      sig    = prod[2*P-2:P-1];
      rnd    = prod[P-2];
      sticky = |prod[P-3:0];
      e_norm = e_sum;
    end
  end

  // rounding logic and correction shift
  fp_round #(.EW(EW), .FW(FW)) u_round (
    .sign(sign), .exp(e_norm), .sig(sig), .rnd(rnd), .sticky(sticky),
    .result(rounded), .ovf(ovf), .unf(unf), .inx(inx)
  );

  // result flags logic and result selector
  always_comb begin
    flags = '0;
    if (anan || bnan) begin
      result = QNAN;
    end else if ((ainf && bzero) || (azero && binf)) begin
      result    = QNAN;
      flags.inv = 1'b1;
    end else if (ainf || binf) begin
      result = {sign, {EW{1'b1}}, {FW{1'b0}}};
    end else if (azero || bzero) begin
      result = {sign, {(EW+FW){1'b0}}};
    end else begin
      result    = rounded;
      flags.ovf = ovf;
      flags.unf = unf;
      flags.inx = inx;
    end
  end
endmodule
