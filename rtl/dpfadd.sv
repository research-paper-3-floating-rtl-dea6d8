// dpfadd: two-path (FAR/CLOSE) floating-point adder/subtractor with rounding
// merged into the significand addition (IEEE 754, single precision by
// default, four rounding modes).
//
// After the exponent difference d and the swap (the larger magnitude becomes
// x), the operation takes one of two paths:
//   CLOSE  effective subtraction with d = 0 or 1. The smaller significand is
//          shifted by at most one bit, so its only guard bit is the bit that
//          falls off. The compound adder forms x - y' - 1 (+0 sum) and
//          x - y' (+1 sum); the leading-zero count of the difference drives
//          the normalizing left shift. Only a normalized difference with the
//          guard bit set can be inexact; it is rounded by choosing between
//          the two sums, never by a separate increment.
//   FAR    effective addition, or effective subtraction with d >= 2. The
//          smaller significand goes through the alignment right shifter,
//          which returns guard, round and sticky bits. The result needs at
//          most a one-bit shift (right after a carry of an addition, left
//          after a subtraction), and the rounding logic picks the sum, the
//          sum + 1 or, after a carry out whose new guard bit is 0 when
//          rounding away from zero, the sum + 2, looking at the carry out,
//          the MSB, the LSB and g, r, s. After a left shift, rounding up by
//          one unit of the shifted +0 sum is the +1 sum shifted, followed by
//          a renormalization when that reaches the next power of two.
// The rounding mode (rm) is seen through the result's sign: nearest even,
// truncation, or rounding away from zero whenever a discarded bit is set.
// Overflow toward zero gives the largest finite number, and an exact zero
// difference is -0 only when rounding toward -infinity.
// Operands that are NaN, infinite or zero skip both paths and use the same
// exception logic as the triple path adder. The two-path split, the compound
// adders, the right shifter, the leading-one logic and the normalizer follow
// the improved dual path block diagram; the leading-one predictor there is
// replaced here by an exact leading-zero count of the difference.
// Combinational. Flags are {overflow, underflow, divide-by-zero, invalid,
// inexact}; denormal inputs count as zero and tiny results are flushed to
// zero. far_path is high when the FAR path made the result, bypass when the
// exception logic did.
module dpfadd
  import fp_pkg::*;
#(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  input  logic           sub,
  input  rmode_t         rm,
  output logic [EW+FW:0] result,
  output fp_flags_t      flags,
  output logic           far_path,
  output logic           bypass
);
  localparam int unsigned P  = FW + 1;
  localparam int unsigned SW = $clog2(P + 2);
  localparam int unsigned CW = $clog2(P + 2);
  typedef logic signed [EW+1:0] sexp_t;

  // ---- exponent difference, swap and control --------------------------------
  logic [EW+FW:0] x, y;
  logic [EW-1:0]  d;
  logic           eff_sub;
  tdp_path_t      tpath;

  tdp_exp_ctrl #(.EW(EW), .FW(FW)) u_ctrl (
    .a(a), .b(b), .sub(sub), .x(x), .y(y), .d(d), .eff_sub(eff_sub), .path(tpath)
  );

  logic special;
  assign special = (&x[EW+FW-1:FW]) | (&y[EW+FW-1:FW]) |
                   (x[EW+FW-1:FW] == '0) | (y[EW+FW-1:FW] == '0);

  logic [EW+FW:0] bp_result;
  fp_flags_t      bp_flags;

  tdp_bypass #(.EW(EW), .FW(FW)) u_bypass (
    .x(x), .y(y), .result(bp_result), .flags(bp_flags)
  );

  logic [P-1:0] mx, my;
  sexp_t        ex;
  assign mx = {1'b1, x[FW-1:0]};
  assign my = {1'b1, y[FW-1:0]};
  assign ex = sexp_t'(x[EW+FW-1:FW]);

  // rounding mode as seen by the magnitude of the result: nearest even,
  // away from zero (up) when any discarded bit is set, or truncate
  logic rne, up;
  assign rne = (rm == RM_NEAREST_EVEN);
  assign up  = (rm == RM_TOWARD_POS && !x[EW+FW]) || (rm == RM_TOWARD_NEG && x[EW+FW]);

  // ---- CLOSE path ------------------------------------------------------------
  logic [P-1:0] c_y;          // y after the 0/1-bit shifter
  logic         c_g;          // the bit shifted out
  logic [P-1:0] c_s0, c_s1;   // compound adder: x + ~y' and x + ~y' + 1
  logic [P-1:0] c_int;        // integer part of x - y' - 0.g
  logic [P:0]   c_exact;      // 2 * (x - y' - 0.g), exact
  logic [CW-1:0] c_lz;
  logic [P:0]   c_norm;
  logic [P-1:0] c_sig;
  sexp_t        c_exp;
  logic         c_inx, c_zero;

  always_comb begin
    c_y     = d[0] ? {1'b0, my[P-1:1]} : my;
    c_g     = d[0] & my[0];
    c_s0    = mx + ~c_y;
    c_s1    = mx + ~c_y + P'(1);
    c_int   = c_g ? c_s0 : c_s1;
    c_exact = {c_int, c_g};
    c_zero  = (c_exact == '0);
  end

  lzc #(.W(P + 1), .CW(CW)) u_lzc (.x(c_exact), .cnt(c_lz));

  norm_shifter #(.W(P + 1), .SW(CW)) u_norm (.a(c_exact), .sel(c_lz), .y(c_norm));

  always_comb begin
    if (c_int[P-1]) begin
      // normalized: with g set, a tie; to nearest even, pick the +1 sum
      // when the +0 sum is odd
      c_sig = (c_g & (rne ? c_s0[0] : up)) ? c_s1 : c_int;
      c_exp = ex;
      c_inx = c_g;
    end else begin
      // one or more left shifts: the difference fits exactly
      c_sig = c_norm[P:1];
      c_exp = ex - sexp_t'(c_lz);
      c_inx = 1'b0;
    end
  end

  // ---- FAR path ----------------------------------------------------------------
  logic [P-1:0]  f_c;
  logic          f_g, f_r, f_s;
  logic [SW-1:0] f_sh;
  logic [P:0]    f_s0, f_s1;  // compound adder, with carry out
  logic [P+1:0]  f_s2;        // sum + 2, for rounding up after a carry out
  logic [P+1:0]  f_t;
  logic [P-1:0]  f_sig;
  sexp_t         f_exp;
  logic          f_inx, f_inc;
  logic [2:0]    f_frac;      // fraction of x - y' - 0.grs below the +0 sum
  logic [P-1:0]  f_int;

  assign f_sh = (d > EW'(P + 1)) ? SW'(P + 2) : SW'(d);

  rshift_grs #(.W(P), .SW(SW)) u_align (
    .a(my), .sh(f_sh), .c(f_c), .g(f_g), .r(f_r), .s(f_s)
  );

  always_comb begin
    f_s0   = {1'b0, mx} + {1'b0, f_c ^ {P{eff_sub}}};
    f_s1   = f_s0 + (P+1)'(1);
    f_s2   = {1'b0, f_s0} + (P+2)'(2);
    f_t    = '0;
    f_frac = 3'(~{f_g, f_r, f_s}) + 3'd1;
    f_int  = '0;
    f_inc  = 1'b0;
    if (!eff_sub) begin
      f_inx = f_s0[0] & f_s0[P] | f_g | f_r | f_s;
      if (f_s0[P]) begin
        // carry out: result LSB is bit 1, bit 0 becomes the guard
        f_inc = rne ? f_s0[0] & (f_s0[1] | f_g | f_r | f_s) : up & f_inx;
        // rounding up selects sum + 1 when bit 0 is set, else sum + 2
        f_t   = !f_inc ? {1'b0, f_s0} : f_s0[0] ? {1'b0, f_s1} : f_s2;
        if (f_t[P+1]) begin
          f_sig = {1'b1, {(P-1){1'b0}}};
          f_exp = ex + sexp_t'(2);
        end else begin
          f_sig = f_t[P:1];
          f_exp = ex + sexp_t'(1);
        end
      end else begin
        f_inc = rne ? f_g & (f_s0[0] | f_r | f_s) : up & f_inx;
        if (f_inc && f_s1[P]) begin
          f_sig = {1'b1, {(P-1){1'b0}}};
          f_exp = ex + sexp_t'(1);
        end else begin
          f_sig = f_inc ? f_s1[P-1:0] : f_s0[P-1:0];
          f_exp = ex;
        end
      end
    end else begin
      // x - y' - 0.grs = int + frac/8, int being the +0 sum when grs != 0
      f_inx = |f_frac;
      f_int = (|f_frac) ? f_s0[P-1:0] : f_s1[P-1:0];
      if (f_int[P-1]) begin
        f_inc = rne ? f_frac[2] & (f_int[0] | f_frac[1] | f_frac[0]) : up & f_inx;
        f_sig = f_inc ? f_s1[P-1:0] : f_int;
        f_exp = ex;
      end else begin
        // one left shift: frac[2] enters as LSB, frac[1] is the guard
        f_inx = f_frac[1] | f_frac[0];
        f_inc = rne ? f_frac[1] & (f_frac[2] | f_frac[0]) : up & f_inx;
        if (!f_inc) begin
          f_sig = {f_int[P-2:0], f_frac[2]};
          f_exp = ex - sexp_t'(1);
        end else if (!f_frac[2]) begin
          f_sig = {f_int[P-2:0], 1'b1};
          f_exp = ex - sexp_t'(1);
        end else if (f_s1[P-1]) begin
          // rounding reached the next power of two
          f_sig = {1'b1, {(P-1){1'b0}}};
          f_exp = ex;
        end else begin
          f_sig = {f_s1[P-2:0], 1'b0};
          f_exp = ex - sexp_t'(1);
        end
      end
    end
  end

  // ---- path multiplexer and packing ------------------------------------------
  logic         close_sel;
  logic [P-1:0] m_sig;
  sexp_t        m_exp;
  logic         m_inx;
  logic [EW+FW:0] packed_res;
  logic         ovf, unf, inx;

  assign close_sel = (tpath == PATH_J_LZA);

  always_comb begin
    m_sig = close_sel ? c_sig : f_sig;
    m_exp = close_sel ? c_exp : f_exp;
    m_inx = close_sel ? c_inx : f_inx;
  end

  fp_round #(.EW(EW), .FW(FW)) u_pack (
    .sign(x[EW+FW]), .exp(m_exp), .sig(m_sig), .rnd(1'b0), .sticky(1'b0),
    .result(packed_res), .ovf(ovf), .unf(unf), .inx(inx)
  );

  always_comb begin
    bypass = special;
    far_path    = !special && !close_sel;
    flags  = '0;
    if (special) begin
      result = bp_result;
      flags  = bp_flags;
      // zeros of opposite signs sum to -0 when rounding toward -infinity
      if (x[EW+FW-1:FW] == '0 && y[EW+FW-1:FW] == '0 && rm == RM_TOWARD_NEG)
        result[EW+FW] = x[EW+FW] | y[EW+FW];
    end else if (close_sel && c_zero) begin
      result = {rm == RM_TOWARD_NEG, {(EW+FW){1'b0}}};
    end else begin
      // an overflow rounded toward zero gives the largest finite number
      result    = (ovf && !rne && !up) ? {x[EW+FW], {(EW-1){1'b1}}, 1'b0, {FW{1'b1}}}
                                       : packed_res;
      flags.ovf = ovf;
      flags.unf = unf;
      flags.inx = inx | m_inx;
    end
  end
endmodule
