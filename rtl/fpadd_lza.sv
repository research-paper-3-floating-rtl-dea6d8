// fpadd_lza: pipelined single-path floating-point adder/subtractor with
// leading-zero anticipation (IEEE 754, double precision by default, round to
// nearest even).
//
// One data path serves every operation. What keeps it fast is that the
// normalizing shift distance is predicted from the adder inputs, in parallel
// with the adder, instead of being counted on the sum. Four register banks
// cut it into stages:
//   stage 1  exponent difference; the operand with the larger exponent is
//            routed to the left side, the other to the right     -> bank 1
//   stage 2  significand compare (it decides the order when the exponents
//            are equal), right shifter with guard/round/sticky bits on the
//            smaller operand, bit inverter on the smaller one for an
//            effective subtraction                                -> bank 2
//   stage 3  (p+3)-bit significand adder (56 bits for double) and, beside it,
//            the LZA logic and counter                            -> bank 3
//   stage 4  exponent subtractor and left shifter driven by the
//            anticipated count (or a 1-bit right shift after a carry out of
//            an addition)                                         -> bank 4
//   after    the one-bit compensation shifter (the anticipated count may be
//            one short), the rounding unit with its incrementer, and the
//            exponent incrementer for a rounding carry
// Because the smaller magnitude is always the one inverted, the sum is never
// negative and no complement stage is needed. Operands sampled on rising
// edge n give out_valid and the result after edge n+3; one operation can
// enter per cycle. Every bank loads only when valid data arrives; the valid
// bits reset asynchronously (rst_n, active low). Stages 1 to 4 follow the
// block diagram's pipeline bars; rounding after the compensation shifter
// rather than before it is this design's choice, so that the rounding
// position is always right. NaN, infinite and zero operands are resolved in
// stage 1 by the same exception logic as the triple path adder, and their
// result travels down the pipeline. Flags are {overflow, underflow,
// divide-by-zero, invalid, inexact}; denormals are flushed to zero.
module fpadd_lza
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
  input  logic           sub,
  output logic           out_valid,
  output logic [EW+FW:0] result,
  output fp_flags_t      flags
);
  localparam int unsigned P  = FW + 1;
  localparam int unsigned W  = P + 3;             // adder width
  localparam int unsigned SW = $clog2(P + 3);
  localparam int unsigned CW = $clog2(W + 1);
  typedef logic signed [EW+1:0] sexp_t;

  logic v1, v2, v3, v4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3, v4} <= '0;
    else        {v1, v2, v3, v4} <= {in_valid, v1, v2, v3};
  end

  // ---- stage 1: exponent difference and operand routing ------------------
  logic [EW+FW:0] be, x0, y0, bp_res0;
  logic [EW:0]    dd;
  fp_flags_t      bp_flg0;
  logic           spec0;

  always_comb begin
    be    = {b[EW+FW] ^ sub, b[EW+FW-1:0]};
    dd    = {1'b0, a[EW+FW-1:FW]} - {1'b0, be[EW+FW-1:FW]};
    x0    = dd[EW] ? be : a;                       // sign of the difference
    y0    = dd[EW] ? a  : be;
    spec0 = (&a[EW+FW-1:FW]) | (&b[EW+FW-1:FW]) |
            (a[EW+FW-1:FW] == '0) | (b[EW+FW-1:FW] == '0);
  end

  tdp_bypass #(.EW(EW), .FW(FW)) u_bypass (
    .x(x0), .y(y0), .result(bp_res0), .flags(bp_flg0)
  );

  logic [EW+FW:0] x1, y1, bp_res1;
  logic [EW-1:0]  d1;
  fp_flags_t      bp_flg1;
  logic           spec1;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x1      <= x0;
      y1      <= y0;
      d1      <= dd[EW] ? EW'(-dd) : dd[EW-1:0];
      spec1   <= spec0;
      bp_res1 <= bp_res0;
      bp_flg1 <= bp_flg0;
    end
  end

  // ---- stage 2: compare, right shifter, bit inverter ------------------------
  logic [P-1:0]  mx1, my1, sh_c;
  logic          sh_g, sh_r, sh_s, swap1, eff_sub1;
  logic [SW-1:0] sh;

  assign mx1      = {1'b1, x1[FW-1:0]};
  assign my1      = {1'b1, y1[FW-1:0]};
  assign sh       = (d1 > EW'(P + 1)) ? SW'(P + 2) : SW'(d1);
  assign eff_sub1 = x1[EW+FW] ^ y1[EW+FW];
  assign swap1    = (d1 == '0) && (my1 > mx1);

  rshift_grs #(.W(P), .SW(SW)) u_align (
    .a(my1), .sh(sh), .c(sh_c), .g(sh_g), .r(sh_r), .s(sh_s)
  );

  logic [W-1:0]   opa2, opb2;
  logic           sub2, sign2, spec2;
  logic [EW-1:0]  e2;
  logic [EW+FW:0] bp_res2;
  fp_flags_t      bp_flg2;

  always_ff @(posedge clk) begin
    if (v1) begin
      opa2    <= swap1 ? {my1, 3'b000} : {mx1, 3'b000};
      opb2    <= (swap1 ? {mx1, 3'b000} : {sh_c, sh_g, sh_r, sh_s}) ^ {W{eff_sub1}};
      sub2    <= eff_sub1;
      sign2   <= swap1 ? y1[EW+FW] : x1[EW+FW];
      e2      <= x1[EW+FW-1:FW];
      spec2   <= spec1;
      bp_res2 <= bp_res1;
      bp_flg2 <= bp_flg1;
    end
  end

  // ---- stage 3: significand adder, LZA logic and counter -------------------
  logic [W:0]    sum_c;
  logic [CW-1:0] lz_c;

  assign sum_c = {1'b0, opa2} + {1'b0, opb2} + (W+1)'(sub2);

  lza #(.W(W), .CW(CW)) u_lza (.a(opa2), .b_inv(opb2), .cnt(lz_c));

  logic [W:0]     sum3;
  logic [CW-1:0]  lz3;
  logic           sub3, sign3, spec3;
  logic [EW-1:0]  e3;
  logic [EW+FW:0] bp_res3;
  fp_flags_t      bp_flg3;

  always_ff @(posedge clk) begin
    if (v2) begin
      sum3    <= sum_c;
      lz3     <= lz_c;
      sub3    <= sub2;
      sign3   <= sign2;
      e3      <= e2;
      spec3   <= spec2;
      bp_res3 <= bp_res2;
      bp_flg3 <= bp_flg2;
    end
  end

  // ---- stage 4: exponent subtractor and left shifter -----------------------
  logic [W-1:0] shifted;

  norm_shifter #(.W(W), .SW(CW)) u_lshift (.a(sum3[W-1:0]), .sel(lz3), .y(shifted));

  logic [W-1:0]   m4;
  logic           st4, sign4, spec4, zero4;
  sexp_t          e4;
  logic [EW+FW:0] bp_res4;
  fp_flags_t      bp_flg4;

  always_ff @(posedge clk) begin
    if (v3) begin
      if (!sub3 && sum3[W]) begin                  // carry out: right by 1
        m4 <= sum3[W:1];
        st4 <= sum3[0];
        e4 <= sexp_t'(e3) + sexp_t'(1);
      end else if (!sub3) begin
        m4 <= sum3[W-1:0];
        st4 <= 1'b0;
        e4 <= sexp_t'(e3);
      end else begin
        m4 <= shifted;
        st4 <= 1'b0;
        e4 <= sexp_t'(e3) - sexp_t'(lz3);
      end
      zero4   <= sub3 && (sum3[W-1:0] == '0);
      sign4   <= sign3;
      spec4   <= spec3;
      bp_res4 <= bp_res3;
      bp_flg4 <= bp_flg3;
    end
  end

  // ---- compensation shifter, rounding, exponent incrementer -----------------
  logic [W-1:0]   mc;
  sexp_t          ec;
  logic [EW+FW:0] rounded;
  logic           ovf, unf, inx;

  always_comb begin
    if (!m4[W-1]) begin
      mc = {m4[W-2:0], 1'b0};
      ec = e4 - sexp_t'(1);
    end else begin
      mc = m4;
      ec = e4;
    end
  end

  fp_round #(.EW(EW), .FW(FW)) u_round (
    .sign(sign4), .exp(ec), .sig(mc[W-1:3]), .rnd(mc[2]), .sticky(|mc[1:0] | st4),
    .result(rounded), .ovf(ovf), .unf(unf), .inx(inx)
  );

  assign out_valid = v4;

  always_comb begin
    flags = '0;
    if (spec4) begin
      result = bp_res4;
      flags  = bp_flg4;
    end else if (zero4) begin
      result = '0;
    end else begin
      result    = rounded;
      flags.ovf = ovf;
      flags.unf = unf;
      flags.inx = inx;
    end
  end
endmodule
