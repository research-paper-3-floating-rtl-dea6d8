// tb_fp_round: rounding unit in single precision.
// 1. The eight rows of the round-to-nearest-even table (LSB 0/1 followed by
//    the bit pairs 00, 01, 10, 11) with their expected rounded LSBs.
// 2. Rounding carry out of an all-ones significand (renormalization).
// 3. Random significands, round/sticky bits and exponents around and beyond
//    the format's range, against the real-number reference (overflow to
//    infinity, flush to zero below the smallest normal, flags).
module tb_fp_round;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        sign, rnd, sticky, ovf, unf, inx;
  logic signed [9:0] exp;
  logic [23:0] sig;
  logic [31:0] result, expr;
  logic [4:0]  eflags;
  real         v;

  fp_round dut (.sign(sign), .exp(exp), .sig(sig), .rnd(rnd), .sticky(sticky),
                .result(result), .ovf(ovf), .unf(unf), .inx(inx));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] e, input logic [4:0] f, input string what);
    #1;
    checks++;
    if (result !== e || {ovf, unf, 2'b00, inx} !== f) begin
      failures++;
      $display("FAIL %s: sig=%h exp=%0d r=%b s=%b got %h %b%b%b exp %h %b", what, sig, exp,
               rnd, sticky, result, ovf, unf, inx, e, f);
    end
  endtask

  initial begin
    // rounding table: {lsb, r, s} -> increment
    bit inc_tab [8] = '{0, 0, 0, 1, 0, 0, 1, 1};
    for (int i = 0; i < 8; i++) begin
      sign = 0; exp = 10'sd127;
      sig = {1'b1, 20'h12345, 2'b00, 1'(i >> 2)};
      rnd = 1'(i >> 1); sticky = 1'(i);
      check({1'b0, 8'd127, sig[22:0] + 23'(inc_tab[i])}, {4'b0000, rnd | sticky}, "table");
    end
    // carry out of rounding
    sign = 1; exp = 10'sd100; sig = '1; rnd = 1; sticky = 0;
    check({1'b1, 8'd101, 23'd0}, 5'b00001, "carry");
    // overflow after the rounding carry
    sign = 0; exp = 10'sd254; sig = '1; rnd = 1; sticky = 1;
    check({1'b0, 8'hFF, 23'd0}, 5'b10001, "overflow");
    // random
    for (int i = 0; i < 3000; i++) begin
      sign   = 1'($urandom);
      exp    = 10'(int'($urandom % 266) - 5);
      sig    = {1'b1, 23'($urandom)};
      rnd    = 1'($urandom);
      sticky = 1'($urandom);
      v = (real'(sig) + 0.5 * rnd + 0.25 * sticky) * pow2(int'(exp) - 127 - 23);
      if (sign) v = -v;
      expr = real2sp(v, eflags);
      check(expr, eflags, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
