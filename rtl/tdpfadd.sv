// tdpfadd: triple path floating-point adder/subtractor (IEEE 754, single
// precision by default, round to nearest even).
//
// An addition is split over three paths, each tuned to one class of operands:
//   I  bypass  special operands, zeros, or an exponent gap too large to matter
//   J  LZA     effective subtraction with exponent difference 0 or 1: 0/1-bit
//              pre-align, subtract, leading-zero count, full left shift
//   K  LZB     all else: full right alignment with G/R/S, add or subtract,
//              1-bit right/left normalization
// Pipeline (three register banks, matching the bars of the block diagram):
//   bank 1  operands a, b and the operation are registered;
//   bank 2  exponent/control logic picks the path; only the operand registers
//           of that path are loaded and the other paths keep their old
//           operands, so their logic does not toggle. The path state register
//           (I, J, K) moves to the state of the new operation's path;
//   bank 3  the result integration/flag logic picks the active path's result.
// Latency: out_valid rises 3 clock edges after in_valid is sampled; a new
// operation can enter every cycle. Reset is asynchronous, active low, and
// clears the valid bits and puts the state machine in I (this design's
// choice). Flags are {overflow, underflow, divide-by-zero, invalid, inexact}.
// Denormal operands are read as zero and tiny results are flushed to zero.
module tdpfadd
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
  // ---- bank 1: input registers -------------------------------------------
  logic           v1, sub1;
  logic [EW+FW:0] a1, b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      a1   <= a;
      b1   <= b;
      sub1 <= sub;
    end
  end

  // ---- exponent logic and control logic ----------------------------------
  logic [EW+FW:0] cx, cy;
  logic [EW-1:0]  cd;
  logic           ceff_sub;
  tdp_path_t      cpath;

  tdp_exp_ctrl #(.EW(EW), .FW(FW)) u_ctrl (
    .a(a1), .b(b1), .sub(sub1),
    .x(cx), .y(cy), .d(cd), .eff_sub(ceff_sub), .path(cpath)
  );

  // ---- bank 2: path state and per-path operand registers -----------------
  logic           v2;
  logic [EW+FW:0] bp_x, bp_y, lza_x, lza_y, lzb_x, lzb_y;
  logic           lza_d1, lzb_sub;
  logic [EW-1:0]  lzb_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2    <= 1'b0;
      state <= PATH_I_BP;
    end else begin
      v2 <= v1;
      if (v1) state <= cpath;  // BP -> I, LZA -> J, LZB -> K from any state
    end
  end

  always_ff @(posedge clk) begin
    if (v1 && cpath == PATH_I_BP) begin
      bp_x <= cx;
      bp_y <= cy;
    end
    if (v1 && cpath == PATH_J_LZA) begin
      lza_x  <= cx;
      lza_y  <= cy;
      lza_d1 <= cd[0];
    end
    if (v1 && cpath == PATH_K_LZB) begin
      lzb_x   <= cx;
      lzb_y   <= cy;
      lzb_d   <= cd;
      lzb_sub <= ceff_sub;
    end
  end

  // ---- the three paths ----------------------------------------------------
  logic [EW+FW:0] bp_res, lza_res, lzb_res;
  fp_flags_t      bp_flg, lza_flg, lzb_flg;

  tdp_bypass #(.EW(EW), .FW(FW)) u_bypass (
    .x(bp_x), .y(bp_y), .result(bp_res), .flags(bp_flg)
  );

  tdp_lza_path #(.EW(EW), .FW(FW)) u_lza (
    .x(lza_x), .y(lza_y), .d1(lza_d1), .result(lza_res), .flags(lza_flg)
  );

  tdp_lzb_path #(.EW(EW), .FW(FW)) u_lzb (
    .x(lzb_x), .y(lzb_y), .d(lzb_d), .eff_sub(lzb_sub),
    .result(lzb_res), .flags(lzb_flg)
  );

  // ---- result integration / flag logic, bank 3 ---------------------------
  logic [EW+FW:0] sel_res;
  fp_flags_t      sel_flg;

  always_comb begin
    unique case (state)
      PATH_J_LZA: begin sel_res = lza_res; sel_flg = lza_flg; end
      PATH_K_LZB: begin sel_res = lzb_res; sel_flg = lzb_flg; end
      default:    begin sel_res = bp_res;  sel_flg = bp_flg;  end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
    end else begin
      out_valid <= v2;
      if (v2) begin
        result <= sel_res;
        flags  <= sel_flg;
      end
    end
  end

  // the path state machine has exactly three states
  a_state_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                  state != 2'd3);
endmodule
