// tb_tdp_lzb_path: far path of the adder on its own. Random single precision
// pairs that belong to this path (effective additions, or effective
// subtractions with exponent difference 2..p+1), ordered by magnitude as the
// control logic would, are compared with the real-number reference. The
// exponent ranges include the overflow edge; the test counts how often the
// 1-bit right shift, the 1-bit left shift and an overflow happened.
module tb_tdp_lzb_path;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] x, y, a, b, t, result, expr;
  logic [7:0]  d;
  logic        eff_sub;
  fp_pkg::fp_flags_t flags;
  logic [4:0]  eflags;
  int          n_right = 0, n_left = 0, n_ovf = 0;

  tdp_lzb_path dut (.x(x), .y(y), .d(d), .eff_sub(eff_sub), .result(result), .flags(flags));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i = 0;
    while (i < 6000) begin
      int e1;
      e1 = (i % 10 == 0) ? 250 + int'($urandom % 5) : 1 + int'($urandom % 254);
      a  = rand_sp(e1, e1);
      b  = rand_sp(e1 - 30 < 1 ? 1 : e1 - 30, e1 > 254 ? 254 : e1);
      if (i % 7 == 0) b[22:0] = '1;                 // provoke rounding carries
      if (b[30:0] > a[30:0]) begin t = a; a = b; b = t; end
      x = a; y = b;
      d = x[30:23] - y[30:23];
      eff_sub = x[31] ^ y[31];
      if (d > 25 || (eff_sub && d <= 1)) continue;
      i++;
      expr = ref_add(x, y, 1'b0, eflags);
      #1;
      checks++;
      if (result !== expr || flags !== eflags) begin
        failures++;
        $display("FAIL x=%h y=%h got %h/%b exp %h/%b", x, y, result, flags, expr, eflags);
      end
      if (result[30:23] > x[30:23]) n_right++;
      if (result[30:23] < x[30:23]) n_left++;
      if (flags.ovf) n_ovf++;
    end
    checks += 3;
    if (n_right == 0) failures++;
    if (n_left == 0) failures++;
    if (n_ovf == 0) failures++;
    $display("right shifts %0d, left shifts %0d, overflows %0d", n_right, n_left, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
