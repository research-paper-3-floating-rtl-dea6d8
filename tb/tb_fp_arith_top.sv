// tb_fp_arith_top: end-to-end test of all units at their default sizes.
//   adder       a stream of single precision additions and subtractions
//               through every path (bypass I, LZA J, LZB K) with overflow,
//               underflow and invalid cases, checked against the real-number
//               reference and for its 3-stage latency;
//   the five-stage pipelined adder gets the same stream and must give the
//               same results after 6 stages;
//   LZA adder   the same stream widened to double precision, checked
//               against the simulator's double precision sum and for its
//               4-stage latency; the one-bit compensation shift after the
//               anticipated normalization must occur;
//   multiplier  double precision: products of widened single precision
//               numbers (exact in double, so the simulator's real product is
//               the reference), hand-worked rounding cases (a tie rounded to
//               even, round down, a product in [2, 4)), overflow and bypassed
//               special operands, checked for the 4-stage latency;
//   two-path adder  random single precision additions and subtractions in
//               all four rounding modes against the reference, through the FAR path, the CLOSE path
//               and the exception bypass;
//   single path multiplier, divider, compound adder and barrel shifters:
//               a few cases each.
// Each mechanism must happen at least once; counts are printed at the end.
module tb_fp_arith_top;
  import fp_ref_pkg::*;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  int   cyc = 0;

  logic        add_in_valid = 0, add_sub = 0, add_out_valid;
  logic [31:0] add_a = 0, add_b = 0, add_result;
  fp_flags_t   add_flags;
  tdp_path_t   add_state;
  logic        padd_in_valid = 0, padd_sub = 0, padd_out_valid;
  logic [31:0] padd_a = 0, padd_b = 0, padd_result;
  fp_flags_t   padd_flags;
  tdp_path_t   padd_state;
  logic [31:0] dadd_a = 0, dadd_b = 0, dadd_result;
  logic        dadd_sub = 0, dadd_far, dadd_bypass;
  rmode_t      dadd_rm = RM_NEAREST_EVEN;
  fp_flags_t   dadd_flags;
  int          n_dadd_far = 0, n_dadd_close = 0, n_dadd_byp = 0;
  logic        ladd_in_valid = 0, ladd_sub = 0, ladd_out_valid;
  logic [63:0] ladd_a = 0, ladd_b = 0, ladd_result;
  fp_flags_t   ladd_flags;
  int          n_ladd = 0, n_ladd_comp = 0;
  logic        mul_in_valid = 0, mul_out_valid, mul_bypassed;
  logic [63:0] mul_a = 0, mul_b = 0, mul_result;
  fp_flags_t   mul_flags;
  logic [31:0] smul_a = 0, smul_b = 0, smul_result, div_a = 0, div_b = 0, div_result;
  fp_flags_t   smul_flags, div_flags;
  logic [23:0] ca_a = 0, ca_b = 0, ca_y;
  logic        ca_sub = 0, ca_sign = 0, ca_cout, ca_inexact;
  logic [2:0]  ca_grs = 0;
  rmode_t      ca_rm = RM_NEAREST_EVEN;
  logic [3:0]  bs_rs_x = 0, bs_rs_y, bs_rot_d = 0, bs_rot_y;
  logic [1:0]  bs_rs_s = 0, bs_rot_s = 0;
  logic [7:0]  bs_dist_x = 0, bs_dist_y, bs_norm_a = 0, bs_norm_y, bs_grs_a = 0, bs_grs_c;
  logic        bs_dist_fill = 0;
  logic [2:0]  bs_dist_s = 0, bs_norm_sel = 0, bs_grs_grs;
  logic [4:0]  bs_grs_sh = 0;

  fp_arith_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [63:0] res;
    logic [4:0]  flg;
    logic        byp;
    int          due;
  } exp_t;
  exp_t qa[$], qp[$], qm[$], ql[$];
  int n_path [3];
  int n_padd = 0, n_add_ovf = 0, n_add_unf = 0, n_add_inv = 0;
  int n_mul_byp = 0, n_mul_inx = 0, n_mul_ovf = 0, n_dbz = 0, n_ca_up = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // output monitors
  always @(negedge clk) if (rst_n) begin
    exp_t e;
    n_path[add_state]++;
    if (add_out_valid) begin
      e = qa.pop_front();
      chk(e.due == cyc && add_result == e.res[31:0] && add_flags == e.flg,
          $sformatf("adder got %h/%b exp %h/%b", add_result, add_flags, e.res[31:0], e.flg));
      if (add_flags.ovf) n_add_ovf++;
      if (add_flags.unf) n_add_unf++;
      if (add_flags.inv) n_add_inv++;
    end
    if (padd_out_valid) begin
      e = qp.pop_front();
      chk(e.due == cyc && padd_result == e.res[31:0] && padd_flags == e.flg,
          $sformatf("five-stage adder got %h/%b exp %h/%b", padd_result, padd_flags, e.res[31:0], e.flg));
      n_padd++;
    end
    if (ladd_out_valid) begin
      e = ql.pop_front();
      chk(e.due == cyc && ladd_result == e.res && ladd_flags == e.flg,
          $sformatf("LZA adder got %h/%b exp %h/%b", ladd_result, ladd_flags, e.res, e.flg));
      n_ladd++;
      if (!dut.u_fpadd_lza.spec4 && !dut.u_fpadd_lza.zero4 &&
          dut.u_fpadd_lza.e4 != dut.u_fpadd_lza.ec) n_ladd_comp++;
    end
    if (mul_out_valid) begin
      e = qm.pop_front();
      chk(e.due == cyc && mul_result == e.res && mul_flags == e.flg && mul_bypassed == e.byp,
          $sformatf("multiplier got %h/%b exp %h/%b", mul_result, mul_flags, e.res, e.flg));
      if (mul_bypassed) n_mul_byp++;
      if (mul_flags.inx) n_mul_inx++;
      if (mul_flags.ovf) n_mul_ovf++;
    end
  end

  function automatic logic [63:0] sp2dp(input logic [31:0] x);
    return $realtobits(sp2real(x));
  endfunction

  // double precision sum of two words with flags {ovf, unf, dbz, inv, inx};
  // inexact from the exact error term of the sum
  function automatic void ref_add_dp(input logic [63:0] pa, input logic [63:0] pb, input logic ps,
                                     output logic [63:0] r, output logic [4:0] fl);
    real ra, rb, s, bv, av;
    ra = $bitstoreal(pa);
    rb = $bitstoreal({pb[63] ^ ps, pb[62:0]});
    fl = '0;
    if (pa[62:52] == 11'h7FF && rb == -ra) begin
      r = 64'h7FF8_0000_0000_0000;
      fl[1] = 1'b1;
      return;
    end
    s  = ra + rb;
    r  = $realtobits(s);
    bv = s - ra;
    av = s - bv;
    if ((ra - av) + (rb - bv) != 0.0) fl[0] = 1'b1;
  endfunction

  task automatic send_mul(input logic [63:0] x, input logic [63:0] y, input logic [63:0] r,
                          input logic [4:0] f, input logic byp);
    exp_t e;
    mul_in_valid = 1;
    mul_a = x; mul_b = y;
    e.res = r; e.flg = f; e.byp = byp; e.due = cyc + 4;
    qm.push_back(e);
  endtask

  initial begin
    logic [4:0]  f;
    logic [31:0] r, x, y;
    exp_t e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- adder and multiplier streams, one operation each per cycle ------
    for (int i = 0; i < 400; i++) begin
      int e1;
      @(negedge clk);
      // adder
      e1 = 2 + int'($urandom % 252);
      x  = rand_sp(e1, e1);
      case (i % 6)
        0: begin y = rand_sp(e1 - 1, e1); y[31] = x[31]; add_sub = 1; end     // LZA
        1: begin y = rand_sp(e1 > 20 ? e1 - 20 : 1, e1); add_sub = 0; end       // LZB
        2: begin y = {1'b0, 8'hFF, 23'd0}; x = {1'b1, 8'hFF, 23'd0}; add_sub = 0; end // inf - inf
        3: begin x = rand_sp(254, 254); y = x; add_sub = 0; end                 // overflow
        4: begin x = rand_sp(1, 1); y = x; y[0] = ~y[0]; add_sub = 1; end       // underflow
        default: begin y = rand_sp(1, 254); add_sub = 1'($urandom); end
      endcase
      add_in_valid = 1;
      add_a = x; add_b = y;
      e.res = {32'd0, ref_add(x, y, add_sub, f)}; e.flg = f; e.byp = 0; e.due = cyc + 3;
      qa.push_back(e);
      padd_in_valid = 1;
      padd_a = x; padd_b = y; padd_sub = add_sub;
      e.due = cyc + 6;
      qp.push_back(e);
      ladd_in_valid = 1;
      ladd_a = sp2dp(x); ladd_b = sp2dp(y); ladd_sub = add_sub;
      ref_add_dp(ladd_a, ladd_b, ladd_sub, e.res, e.flg);
      e.due = cyc + 4;
      ql.push_back(e);
      // multiplier: widened single precision operands, exact product
      x = rand_sp(64, 190);
      y = rand_sp(64, 190);
      send_mul(sp2dp(x), sp2dp(y), $realtobits(sp2real(x) * sp2real(y)), 5'b00000, 1'b0);
    end
    // multiplier cases worked by hand
    @(negedge clk);
    add_in_valid = 0;
    padd_in_valid = 0;
    ladd_in_valid = 0;
    send_mul(64'h3FF0000000000001, 64'h3FF0000000000001, 64'h3FF0000000000002, 5'b00001, 0);
    @(negedge clk);
    send_mul(64'h3FF0000000000001, 64'h3FF8000000000000, 64'h3FF8000000000002, 5'b00001, 0);
    @(negedge clk);
    send_mul(64'h3FFFFFFFFFFFFFFF, 64'h3FFFFFFFFFFFFFFF, 64'h400FFFFFFFFFFFFE, 5'b00001, 0);
    @(negedge clk);
    send_mul(64'hFFE0000000000000, 64'h4000000000000000, 64'hFFF0000000000000, 5'b10001, 0);
    @(negedge clk);
    send_mul(64'h0000000000000000, 64'h7FF0000000000000, 64'h7FF8000000000000, 5'b00010, 1);
    @(negedge clk);
    send_mul(64'hC008000000000000, 64'h8000000000000000, 64'h0000000000000000, 5'b00000, 1);
    @(negedge clk);
    mul_in_valid = 0;
    repeat (8) @(negedge clk);
    chk(qa.size() == 0 && qp.size() == 0 && qm.size() == 0, "results missing");

    // ---- combinational units ----------------------------------------------
    for (int i = 0; i < 600; i++) begin
      dadd_a   = rand_sp(1, 254);
      dadd_b   = (i % 3 == 0) ? rand_sp(int'(dadd_a[30:23]), int'(dadd_a[30:23]))
                              : rand_sp(1, 254);
      dadd_sub = 1'($urandom);
      dadd_rm  = rmode_t'(i % 4);
      if (i % 50 == 0) dadd_b[30:0] = 31'h7F80_0000;
      #1;
      r = ref_add_rm(dadd_a, dadd_b, dadd_sub, int'(dadd_rm), f);
      chk(dadd_result == r && dadd_flags == f, "two-path adder result");
      if (dadd_bypass) n_dadd_byp++;
      else if (dadd_far) n_dadd_far++;
      else n_dadd_close++;
    end
    smul_a = 32'h408051EB; smul_b = 32'h40566666; #1;
    chk(smul_result == 32'h4156EF9C, "single path multiplier case 1");
    smul_a = 32'h40066666; smul_b = 32'h40066666; #1;
    chk(smul_result == 32'h408D1EB7, "single path multiplier case 2");
    div_a = 32'h3F800000; div_b = 32'h40400000; #1;
    r = ref_div(div_a, div_b, f);
    chk(div_result == r && div_flags == f, "divider 1/3");
    div_a = 32'h40400000; div_b = 32'h00000000; #1;
    chk(div_result == 32'h7F800000 && div_flags.dbz, "divider 3/0");
    if (div_flags.dbz) n_dbz++;
    // compound adder: 0x000010 + 0x000003 + 0.110b rounds up to 0x000014
    ca_a = 24'h10; ca_b = 24'h3; ca_grs = 3'b110; ca_rm = RM_NEAREST_EVEN; #1;
    chk(ca_y == 24'h14 && ca_inexact, "compound adder round up");
    if (ca_y == 24'h14) n_ca_up++;
    // 0x000010 - (0x000003 + 0.010b) = 12.75 -> 13 to nearest, 12 toward zero
    ca_sub = 1; ca_grs = 3'b010; #1;
    chk(ca_y == 24'hD, "compound adder subtract, nearest");
    ca_rm = RM_TOWARD_ZERO; #1;
    chk(ca_y == 24'hC, "compound adder subtract, toward zero");
    // barrel shifters
    bs_rs_x = 4'b1011; bs_rs_s = 2'd2; bs_rot_d = 4'b1000; bs_rot_s = 2'd1;
    bs_dist_x = 8'b0010_0000; bs_dist_s = 3'b101; bs_norm_a = 8'b0000_0101; bs_norm_sel = 3'd5;
    bs_grs_a = 8'b1011_0111; bs_grs_sh = 5'd4; #1;
    chk(bs_rs_y == 4'b0010, "right barrel shifter");
    chk(bs_rot_y == 4'b0001, "rotator");
    chk(bs_dist_y == 8'b0000_0001, "distributed shifter");
    chk(bs_norm_y == 8'b1010_0000, "normalization shifter");
    chk(bs_grs_c == 8'b0000_1011 && bs_grs_grs == 3'b011, "GRS shifter");

    // ---- every mechanism happened ------------------------------------------
    $display("adder states I %0d J %0d K %0d, ovf %0d unf %0d inv %0d", n_path[0], n_path[1],
             n_path[2], n_add_ovf, n_add_unf, n_add_inv);
    $display("LZA adder results %0d, compensation shifts %0d", n_ladd, n_ladd_comp);
    $display("two-path adder far %0d close %0d bypass %0d", n_dadd_far, n_dadd_close, n_dadd_byp);
    $display("multiplier bypassed %0d inexact %0d ovf %0d; divide by zero %0d; compound round up %0d",
             n_mul_byp, n_mul_inx, n_mul_ovf, n_dbz, n_ca_up);
    chk(n_path[0] > 0, "bypass path never used");
    chk(n_path[1] > 0, "LZA path never used");
    chk(n_path[2] > 0, "LZB path never used");
    chk(n_padd == 400, "five-stage adder results");
    chk(n_ladd == 400, "LZA adder results");
    chk(n_ladd_comp > 0, "LZA adder never needed the compensation shift");
    chk(n_add_ovf > 0, "adder overflow never happened");
    chk(n_add_unf > 0, "adder underflow never happened");
    chk(n_add_inv > 0, "adder invalid never happened");
    chk(n_dadd_far > 0, "two-path adder FAR path never used");
    chk(n_dadd_close > 0, "two-path adder CLOSE path never used");
    chk(n_dadd_byp > 0, "two-path adder bypass never used");
    chk(n_mul_byp > 0, "multiplier bypass never used");
    chk(n_mul_inx > 0, "multiplier rounding never inexact");
    chk(n_mul_ovf > 0, "multiplier overflow never happened");
    chk(n_dbz > 0, "divide by zero never happened");
    chk(n_ca_up > 0, "compound adder never rounded up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
