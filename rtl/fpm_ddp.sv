// fpm_ddp: pipelined double data path IEEE 754 floating-point multiplier
// (double precision by default, round to nearest even).
//
// Two data paths leave the control logic. Path 1 is the significand
// multiplier with its rounding and normalization; path 2 is the bypass logic
// for special operands (NaN, infinity, zero), which never needs a product.
// Only the registers of the path in use are loaded, so the multiplier does
// not switch for special operands. Rounding is merged with the carry-
// propagate stage: two rounded versions of the upper product half are made at
// once, one for a product in [1, 2) and one for a product in [2, 4) with the
// exponent incremented, and the result selector picks one by the product MSB.
// Pipeline register banks:
//   1st  operand registers
//   2nd  after exponent logic (e1 + e2 - bias) and control/sign logic
//   3rd  after the significand multiplier (full 2p-bit product)
//   out  after result integration and flag logic
// Latency: out_valid rises 4 clock edges after in_valid is sampled, one new
// operation per cycle. The bank boundaries follow the block diagram; the
// output bank and the latency are this design's choice, as are asynchronous
// active-low reset, flush of denormals to zero and the flag order
// {overflow, underflow, divide-by-zero, invalid, inexact}.
module fpm_ddp
  import fp_pkg::*;
#(
  parameter int unsigned EW = 11,
  parameter int unsigned FW = 52
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  output logic           out_valid,
  output logic [EW+FW:0] result,
  output fp_flags_t      flags,
  output logic           bypassed
);
  localparam int unsigned P = FW + 1;
  localparam logic signed [EW+1:0] BIAS = (EW+2)'((1 << (EW - 1)) - 1);
  localparam logic [EW+FW:0] QNAN = {1'b0, {EW{1'b1}}, 1'b1, {(FW-1){1'b0}}};

  // ---- 1st bank ------------------------------------------------------------
  logic           v1;
  logic [EW+FW:0] a1, b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      a1 <= a;
      b1 <= b;
    end
  end

  // ---- exponent logic, control / sign logic --------------------------------
  logic [EW-1:0] ea, eb;
  logic          sign1, anan, bnan, ainf, binf, azero, bzero, byp1;
  logic signed [EW+1:0] e1;

  always_comb begin
    ea    = a1[EW+FW-1:FW];
    eb    = b1[EW+FW-1:FW];
    sign1 = a1[EW+FW] ^ b1[EW+FW];
    anan  = (&ea) && (a1[FW-1:0] != '0);
    bnan  = (&eb) && (b1[FW-1:0] != '0);
    ainf  = (&ea) && (a1[FW-1:0] == '0);
    binf  = (&eb) && (b1[FW-1:0] == '0);
    azero = (ea == '0);
    bzero = (eb == '0);
    byp1  = (&ea) | (&eb) | azero | bzero;
    e1    = (EW+2)'(ea) + (EW+2)'(eb) - BIAS;
  end

  // ---- 2nd bank ------------------------------------------------------------
  logic           v2, byp2, sign2;
  logic signed [EW+1:0] e2;
  logic [P-1:0]   ma2, mb2;
  logic [2:0]     cls2;      // {nan, invalid, infinity} of the bypass case; else zero

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      byp2  <= byp1;
      sign2 <= sign1;
      if (byp1) begin
        cls2 <= {anan | bnan,
                 (ainf & bzero) | (azero & binf),
                 ainf | binf};
      end else begin
        e2  <= e1;
        ma2 <= {1'b1, a1[FW-1:0]};
        mb2 <= {1'b1, b1[FW-1:0]};
      end
    end
  end

  // ---- path 1: significand multiplier; path 2: bypass logic ---------------
  logic [2*P-1:0] prod2;
  logic [EW+FW:0] byp_res2;
  fp_flags_t      byp_flg2;

  assign prod2 = ma2 * mb2;

  always_comb begin
    byp_flg2 = '0;
    if (cls2[2]) begin
      byp_res2 = QNAN;
    end else if (cls2[1]) begin
      byp_res2     = QNAN;
      byp_flg2.inv = 1'b1;
    end else if (cls2[0]) begin
      byp_res2 = {sign2, {EW{1'b1}}, {FW{1'b0}}};
    end else begin
      byp_res2 = {sign2, {(EW+FW){1'b0}}};
    end
  end

  // ---- 3rd bank ------------------------------------------------------------
  logic           v3, byp3, sign3;
  logic signed [EW+1:0] e3;
  logic [2*P-1:0] prod3;
  logic [EW+FW:0] byp_res3;
  fp_flags_t      byp_flg3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
  end

  always_ff @(posedge clk) begin
    if (v2) begin
      byp3  <= byp2;
      sign3 <= sign2;
      if (byp2) begin
        byp_res3 <= byp_res2;
        byp_flg3 <= byp_flg2;
      end else begin
        e3    <= e2;
        prod3 <= prod2;
      end
    end
  end

  // ---- CPA / rounding logic with sticky logic: two rounded versions ------
  logic [EW+FW:0] res_hi, res_lo;
  logic           ovf_hi, unf_hi, inx_hi, ovf_lo, unf_lo, inx_lo;
  logic           sticky_hi, sticky_lo;

  assign sticky_hi = |prod3[P-2:0];
  assign sticky_lo = |prod3[P-3:0];

  // product in [2, 4): exponent incremented
  fp_round #(.EW(EW), .FW(FW)) u_round_hi (
    .sign(sign3), .exp(e3 + (EW+2)'(1)), .sig(prod3[2*P-1:P]), .rnd(prod3[P-1]),
    .sticky(sticky_hi), .result(res_hi), .ovf(ovf_hi), .unf(unf_hi), .inx(inx_hi)
  );

  // product in [1, 2)
  fp_round #(.EW(EW), .FW(FW)) u_round_lo (
    .sign(sign3), .exp(e3), .sig(prod3[2*P-2:P-1]), .rnd(prod3[P-2]),
    .sticky(sticky_lo), .result(res_lo), .ovf(ovf_lo), .unf(unf_lo), .inx(inx_lo)
  );

  // ---- result selector / normalization, result integration / flags -------
  logic [EW+FW:0] res3;
  fp_flags_t      flg3;

  always_comb begin
    flg3 = '0;
    if (byp3) begin
      res3 = byp_res3;
      flg3 = byp_flg3;
    end else if (prod3[2*P-1]) begin
      res3     = res_hi;
      flg3.ovf = ovf_hi;
      flg3.unf = unf_hi;
      flg3.inx = inx_hi;
    end else begin
      res3     = res_lo;
      flg3.ovf = ovf_lo;
      flg3.unf = unf_lo;
      flg3.inx = inx_lo;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
      bypassed  <= 1'b0;
    end else begin
      out_valid <= v3;
      if (v3) begin
        result   <= res3;
        flags    <= flg3;
        bypassed <= byp3;
      end
    end
  end
endmodule
