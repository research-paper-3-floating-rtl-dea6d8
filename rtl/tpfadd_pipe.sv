// tpfadd_pipe: pipelined triple path floating-point adder/subtractor (IEEE
// 754, single precision by default, round to nearest even).
//
// The same three paths as tdpfadd (bypass I, LZA J, LZB K), cut into five
// stages so that each stage holds only part of the critical path:
//   bank 1  operands a, b and the operation
//   bank 2  after exponent logic and control logic: path state register and
//           the operands of the chosen path (the other paths hold)
//   bank 3  after the data selectors and pre-alignment: LZB has its smaller
//           significand right-shifted with guard/round/sticky, LZA has its
//           0/1-bit pre-aligned operands, bypass has its finished result
//   bank 4  after the significand adders (sum for LZB, difference for LZA)
//   bank 5  after the result selectors: LZB has picked its 1-bit right/left
//           normalization and adjusted the exponent; LZA has its
//           leading-zero count and the exponent subtractor's result
//   out     after the left barrel shifter of LZA, the rounding unit and the
//           result integration/flag logic
// Every bank of a path is loaded only when the operation in the stage before
// it uses that path. out_valid rises on the sixth rising edge counting the
// one that samples the operands; one operation can enter per cycle. Where
// the rounding sits (here, in the last stage) and the output bank are this
// design's choices; the stage boundaries 1 to 5 follow the pipelined block
// diagram. Reset is asynchronous and active low; it clears the valid bits and
// puts the path state in I. Flags are {overflow, underflow, divide-by-zero,
// invalid, inexact}; denormals are flushed to zero.
module tpfadd_pipe
  import fp_pkg::*;
#(
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [EW+FW:0] a,
  input  logic [EW+FW:0] b,
  input  logic           sub,
  output logic           out_valid,
  output logic [EW+FW:0] result,
  output fp_flags_t      flags,
  output tdp_path_t      state
);
  localparam int unsigned P  = FW + 1;
  localparam int unsigned SW = $clog2(P + 2);
  localparam int unsigned CW = $clog2(P + 2);
  typedef logic signed [EW+1:0] sexp_t;

  // ---- valid bits and path tags through the stages -------------------------
  logic      v1, v2, v3, v4, v5;
  tdp_path_t p3, p4, p5;

  // ---- stage 1 -> bank 1 --------------------------------------------------
  logic [EW+FW:0] a1, b1;
  logic           sub1;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      a1   <= a;
      b1   <= b;
      sub1 <= sub;
    end
  end

  // ---- exponent logic, control logic -> bank 2 ----------------------------
  logic [EW+FW:0] cx, cy;
  logic [EW-1:0]  cd;
  logic           ceff_sub;
  tdp_path_t      cpath;

  tdp_exp_ctrl #(.EW(EW), .FW(FW)) u_ctrl (
    .a(a1), .b(b1), .sub(sub1), .x(cx), .y(cy), .d(cd), .eff_sub(ceff_sub), .path(cpath)
  );

  // valid bits advance every cycle; path tags follow the operations
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, v5} <= '0;
      state <= PATH_I_BP;
      p3    <= PATH_I_BP;
      p4    <= PATH_I_BP;
      p5    <= PATH_I_BP;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;
      v5 <= v4;
      if (v1) state <= cpath;
      if (v2) p3 <= state;
      if (v3) p4 <= p3;
      if (v4) p5 <= p4;
    end
  end

  logic [EW+FW:0] x2_bp, y2_bp, x2_j, y2_j, x2_k, y2_k;
  logic           d1_j, sub_k;
  logic [EW-1:0]  d_k;

  always_ff @(posedge clk) begin
    if (v1 && cpath == PATH_I_BP) begin
      x2_bp <= cx;
      y2_bp <= cy;
    end
    if (v1 && cpath == PATH_J_LZA) begin
      x2_j <= cx;
      y2_j <= cy;
      d1_j <= cd[0];
    end
    if (v1 && cpath == PATH_K_LZB) begin
      x2_k  <= cx;
      y2_k  <= cy;
      d_k   <= cd;
      sub_k <= ceff_sub;
    end
  end

  // ---- data selectors / pre-alignment, bypass logic -> bank 3 --------------
  logic [EW+FW:0] bp_res;
  fp_flags_t      bp_flg;
  logic [P-1:0]   c_k;
  logic           g_k, r_k, s_k;
  logic [SW-1:0]  sh_k;

  tdp_bypass #(.EW(EW), .FW(FW)) u_bypass (.x(x2_bp), .y(y2_bp), .result(bp_res), .flags(bp_flg));

  assign sh_k = (d_k > EW'(P + 1)) ? SW'(P + 2) : SW'(d_k);

  rshift_grs #(.W(P), .SW(SW)) u_align (
    .a({1'b1, y2_k[FW-1:0]}), .sh(sh_k), .c(c_k), .g(g_k), .r(r_k), .s(s_k)
  );

  logic [EW+FW:0] bp_res3;
  fp_flags_t      bp_flg3;
  logic [P+3:0]   opx_k3, opy_k3;
  logic           sub_k3, sign_k3, sign_j3;
  sexp_t          e_k3, e_j3;
  logic [P:0]     opx_j3, opy_j3;

  always_ff @(posedge clk) begin
    if (v2 && state == PATH_I_BP) begin
      bp_res3 <= bp_res;
      bp_flg3 <= bp_flg;
    end
    if (v2 && state == PATH_K_LZB) begin
      opx_k3  <= {1'b0, 1'b1, x2_k[FW-1:0], 3'b000};
      opy_k3  <= {1'b0, c_k, g_k, r_k, s_k};
      sub_k3  <= sub_k;
      sign_k3 <= x2_k[EW+FW];
      e_k3    <= sexp_t'(x2_k[EW+FW-1:FW]);
    end
    if (v2 && state == PATH_J_LZA) begin
      opx_j3  <= {1'b1, x2_j[FW-1:0], 1'b0};
      opy_j3  <= d1_j ? {2'b01, y2_j[FW-1:0]} : {1'b1, y2_j[FW-1:0], 1'b0};
      sign_j3 <= x2_j[EW+FW];
      e_j3    <= sexp_t'(x2_j[EW+FW-1:FW]);
    end
  end

  // ---- significand adders -> bank 4 ---------------------------------------
  logic [EW+FW:0] bp_res4;
  fp_flags_t      bp_flg4;
  logic [P+3:0]   sum_k4;
  logic [P:0]     diff_j4;
  logic           sign_k4, sign_j4;
  sexp_t          e_k4, e_j4;

  always_ff @(posedge clk) begin
    if (v3 && p3 == PATH_I_BP) begin
      bp_res4 <= bp_res3;
      bp_flg4 <= bp_flg3;
    end
    if (v3 && p3 == PATH_K_LZB) begin
      sum_k4  <= sub_k3 ? (opx_k3 - opy_k3) : (opx_k3 + opy_k3);
      sign_k4 <= sign_k3;
      e_k4    <= e_k3;
    end
    if (v3 && p3 == PATH_J_LZA) begin
      diff_j4 <= opx_j3 - opy_j3;
      sign_j4 <= sign_j3;
      e_j4    <= e_j3;
    end
  end

  // ---- result selectors, leading-zero counter, exponent logic -> bank 5 ----
  logic [P-1:0]  sig_k;
  logic          rnd_k, st_k;
  sexp_t         en_k;
  logic [CW-1:0] lz_j;

  always_comb begin
    if (sum_k4[P+3]) begin
      sig_k = sum_k4[P+3:4];
      rnd_k = sum_k4[3];
      st_k  = |sum_k4[2:0];
      en_k  = e_k4 + sexp_t'(1);
    end else if (sum_k4[P+2]) begin
      sig_k = sum_k4[P+2:3];
      rnd_k = sum_k4[2];
      st_k  = |sum_k4[1:0];
      en_k  = e_k4;
    end else begin
      sig_k = sum_k4[P+1:2];
      rnd_k = sum_k4[1];
      st_k  = sum_k4[0];
      en_k  = e_k4 - sexp_t'(1);
    end
  end

  lzc #(.W(P + 1), .CW(CW)) u_lzc (.x(diff_j4), .cnt(lz_j));

  logic [EW+FW:0] bp_res5;
  fp_flags_t      bp_flg5;
  logic [P-1:0]   sig_k5;
  logic           rnd_k5, st_k5, sign_k5, sign_j5, zero_j5;
  sexp_t          e_k5, e_j5;
  logic [P:0]     diff_j5;
  logic [CW-1:0]  lz_j5;

  always_ff @(posedge clk) begin
    if (v4 && p4 == PATH_I_BP) begin
      bp_res5 <= bp_res4;
      bp_flg5 <= bp_flg4;
    end
    if (v4 && p4 == PATH_K_LZB) begin
      sig_k5  <= sig_k;
      rnd_k5  <= rnd_k;
      st_k5   <= st_k;
      e_k5    <= en_k;
      sign_k5 <= sign_k4;
    end
    if (v4 && p4 == PATH_J_LZA) begin
      diff_j5 <= diff_j4;
      lz_j5   <= lz_j;
      e_j5    <= e_j4 - sexp_t'(lz_j);
      zero_j5 <= (diff_j4 == '0);
      sign_j5 <= sign_j4;
    end
  end

  // ---- left barrel shifter, rounding, result integration -> out bank -------
  logic [P:0]     norm_j;
  logic [EW+FW:0] res_k, res_j;
  logic           ovf_k, unf_k, inx_k, ovf_j, unf_j, inx_j;

  norm_shifter #(.W(P + 1), .SW(CW)) u_norm (.a(diff_j5), .sel(lz_j5), .y(norm_j));

  fp_round #(.EW(EW), .FW(FW)) u_round_k (
    .sign(sign_k5), .exp(e_k5), .sig(sig_k5), .rnd(rnd_k5), .sticky(st_k5),
    .result(res_k), .ovf(ovf_k), .unf(unf_k), .inx(inx_k)
  );

  fp_round #(.EW(EW), .FW(FW)) u_round_j (
    .sign(sign_j5), .exp(e_j5), .sig(norm_j[P:1]), .rnd(norm_j[0]), .sticky(1'b0),
    .result(res_j), .ovf(ovf_j), .unf(unf_j), .inx(inx_j)
  );

  logic [EW+FW:0] sel_res;
  fp_flags_t      sel_flg;

  always_comb begin
    sel_flg = '0;
    unique case (p5)
      PATH_K_LZB: begin
        sel_res     = res_k;
        sel_flg.ovf = ovf_k;
        sel_flg.unf = unf_k;
        sel_flg.inx = inx_k;
      end
      PATH_J_LZA: begin
        if (zero_j5) begin
          sel_res = '0;
        end else begin
          sel_res     = res_j;
          sel_flg.ovf = ovf_j;
          sel_flg.unf = unf_j;
          sel_flg.inx = inx_j;
        end
      end
      default: begin
        sel_res = bp_res5;
        sel_flg = bp_flg5;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
    end else begin
      out_valid <= v5;
      if (v5) begin
        result <= sel_res;
        flags  <= sel_flg;
      end
    end
  end
endmodule
