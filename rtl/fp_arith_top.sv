// fp_arith_top: the floating-point arithmetic units side by side.
//
// The units do not feed each other; each keeps its own group of ports:
//   add_*   triple path adder/subtractor, IEEE single, pipelined, latency 3
//   padd_*  the same adder cut into five stages, latency 6
//   dadd_*  two-path (FAR/CLOSE) adder with rounding merged into the
//           significand addition, IEEE single, four rounding modes,
//           combinational
//   ladd_*  pipelined single-path adder with leading-zero anticipation,
//           IEEE double, latency 4
//   mul_*   pipelined double data path multiplier, IEEE double, latency 4
//   smul_*  single data path multiplier, IEEE single, combinational
//   div_*   divider, IEEE single, combinational
//   ca_*    compound significand adder with rounding, 24 bits
//   bs_*    the barrel shifter building blocks at their example sizes: a
//           4-bit right shifter, a 4-bit rotator, an 8-bit distributed
//           shifter, an 8-bit normalization (left) shifter and an 8-bit
//           alignment shifter with guard/round/sticky output
// The pipelined units share clk and rst_n (asynchronous, active low). Flags
// everywhere are {overflow, underflow, divide-by-zero, invalid, inexact}.
module fp_arith_top
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // triple path adder
  input  logic        add_in_valid,
  input  logic [31:0] add_a,
  input  logic [31:0] add_b,
  input  logic        add_sub,
  output logic        add_out_valid,
  output logic [31:0] add_result,
  output fp_flags_t   add_flags,
  output tdp_path_t   add_state,
  // five-stage pipelined triple path adder
  input  logic        padd_in_valid,
  input  logic [31:0] padd_a,
  input  logic [31:0] padd_b,
  input  logic        padd_sub,
  output logic        padd_out_valid,
  output logic [31:0] padd_result,
  output fp_flags_t   padd_flags,
  output tdp_path_t   padd_state,

  input  logic [31:0] dadd_a,
  input  logic [31:0] dadd_b,
  input  logic        dadd_sub,
  input  rmode_t      dadd_rm,
  output logic [31:0] dadd_result,
  output fp_flags_t   dadd_flags,
  output logic        dadd_far,
  output logic        dadd_bypass,
  // pipelined double data path multiplier
  input  logic        ladd_in_valid,
  input  logic [63:0] ladd_a,
  input  logic [63:0] ladd_b,
  input  logic        ladd_sub,
  output logic        ladd_out_valid,
  output logic [63:0] ladd_result,
  output fp_flags_t   ladd_flags,

  input  logic        mul_in_valid,
  input  logic [63:0] mul_a,
  input  logic [63:0] mul_b,
  output logic        mul_out_valid,
  output logic [63:0] mul_result,
  output fp_flags_t   mul_flags,
  output logic        mul_bypassed,
  // single data path multiplier
  input  logic [31:0] smul_a,
  input  logic [31:0] smul_b,
  output logic [31:0] smul_result,
  output fp_flags_t   smul_flags,
  // divider
  input  logic [31:0] div_a,
  input  logic [31:0] div_b,
  output logic [31:0] div_result,
  output fp_flags_t   div_flags,
  // compound adder
  input  logic [23:0] ca_a,
  input  logic [23:0] ca_b,
  input  logic        ca_sub,
  input  logic [2:0]  ca_grs,
  input  rmode_t      ca_rm,
  input  logic        ca_sign,
  output logic [23:0] ca_y,
  output logic        ca_cout,
  output logic        ca_inexact,
  // barrel shifters
  input  logic [3:0]  bs_rs_x,
  input  logic [1:0]  bs_rs_s,
  output logic [3:0]  bs_rs_y,
  input  logic [3:0]  bs_rot_d,
  input  logic [1:0]  bs_rot_s,
  output logic [3:0]  bs_rot_y,
  input  logic [7:0]  bs_dist_x,
  input  logic        bs_dist_fill,
  input  logic [2:0]  bs_dist_s,
  output logic [7:0]  bs_dist_y,
  input  logic [7:0]  bs_norm_a,
  input  logic [2:0]  bs_norm_sel,
  output logic [7:0]  bs_norm_y,
  input  logic [7:0]  bs_grs_a,
  input  logic [4:0]  bs_grs_sh,
  output logic [7:0]  bs_grs_c,
  output logic [2:0]  bs_grs_grs
);
  tdpfadd u_tdpfadd (
    .clk(clk), .rst_n(rst_n), .in_valid(add_in_valid), .a(add_a), .b(add_b),
    .sub(add_sub), .out_valid(add_out_valid), .result(add_result),
    .flags(add_flags), .state(add_state)
  );

  tpfadd_pipe u_tpfadd_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(padd_in_valid), .a(padd_a), .b(padd_b),
    .sub(padd_sub), .out_valid(padd_out_valid), .result(padd_result),
    .flags(padd_flags), .state(padd_state)
  );

  fpadd_lza u_fpadd_lza (
    .clk(clk), .rst_n(rst_n), .in_valid(ladd_in_valid), .a(ladd_a), .b(ladd_b),
    .sub(ladd_sub), .out_valid(ladd_out_valid), .result(ladd_result), .flags(ladd_flags)
  );

  fpm_ddp u_fpm_ddp (
    .clk(clk), .rst_n(rst_n), .in_valid(mul_in_valid), .a(mul_a), .b(mul_b),
    .out_valid(mul_out_valid), .result(mul_result), .flags(mul_flags),
    .bypassed(mul_bypassed)
  );

  dpfadd u_dpfadd (
    .a(dadd_a), .b(dadd_b), .sub(dadd_sub), .rm(dadd_rm), .result(dadd_result), .flags(dadd_flags),
    .far_path(dadd_far), .bypass(dadd_bypass)
  );

  fp_mul u_fp_mul (.a(smul_a), .b(smul_b), .result(smul_result), .flags(smul_flags));

  fp_div u_fp_div (.a(div_a), .b(div_b), .result(div_result), .flags(div_flags));

  compound_adder u_compound_adder (
    .a(ca_a), .b(ca_b), .sub(ca_sub), .g(ca_grs[2]), .r(ca_grs[1]), .s(ca_grs[0]),
    .rm(ca_rm), .sign(ca_sign), .y(ca_y), .cout(ca_cout), .inexact(ca_inexact)
  );

  barrel_rshift4 u_rshift4 (.x(bs_rs_x), .s(bs_rs_s), .y(bs_rs_y));

  barrel_rotate4 u_rotate4 (.d(bs_rot_d), .s(bs_rot_s), .y(bs_rot_y));

  dist_barrel_shifter u_dist (.x(bs_dist_x), .fill(bs_dist_fill), .s(bs_dist_s), .y(bs_dist_y));

  norm_shifter u_norm (.a(bs_norm_a), .sel(bs_norm_sel), .y(bs_norm_y));

  rshift_grs u_grs (
    .a(bs_grs_a), .sh(bs_grs_sh), .c(bs_grs_c),
    .g(bs_grs_grs[2]), .r(bs_grs_grs[1]), .s(bs_grs_grs[0])
  );
endmodule
