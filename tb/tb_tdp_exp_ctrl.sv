// tb_tdp_exp_ctrl: exponent and control logic of the adder. For random
// operands (normal numbers, zeros, infinities, NaNs, nearby and distant
// exponents, add and subtract) it checks that x holds the operand of larger
// magnitude and y the other with the operation's sign applied, the exponent
// difference, the effective operation, and the path: bypass for special
// operands or a difference above 25, LZA for an effective subtraction with a
// difference of 0 or 1, LZB otherwise. Each path must be chosen.
module tb_tdp_exp_ctrl;
  import fp_ref_pkg::*;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, x, y, bb, ex_x, ex_y;
  logic        sub, eff_sub, e_eff, swapped;
  logic [7:0]  d;
  tdp_path_t   path, e_path;
  int          ed;
  int          seen [3];

  tdp_exp_ctrl dut (.a(a), .b(b), .sub(sub), .x(x), .y(y), .d(d), .eff_sub(eff_sub), .path(path));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int e1;
      e1  = 1 + int'($urandom % 254);
      a   = rand_sp(e1, e1);
      b   = (i % 2) ? rand_sp(e1 > 2 ? e1 - 2 : 1, e1 < 253 ? e1 + 1 : 254) : rand_sp(1, 254);
      if (i % 13 == 0) b = {1'($urandom), 8'h00, 23'd0};
      if (i % 17 == 0) a = {1'($urandom), 8'hFF, 23'($urandom % 2)};
      sub = 1'($urandom);
      bb  = {b[31] ^ sub, b[30:0]};
      // larger magnitude first (ties keep a first)
      if (is_nan(a) || is_nan(b) || is_inf(a) || is_inf(b) || is_zero(a) || is_zero(b))
        swapped = b[30:0] > a[30:0];
      else
        swapped = sp2real({1'b0, b[30:0]}) > sp2real({1'b0, a[30:0]});
      ex_x = swapped ? bb : a;
      ex_y = swapped ? a : bb;
      ed    = int'(ex_x[30:23]) - int'(ex_y[30:23]);
      e_eff = ex_x[31] != ex_y[31];
      if (ex_x[30:23] == 8'hFF || ex_y[30:23] == 8'hFF || ex_x[30:23] == 0 || ex_y[30:23] == 0 || ed > 25)
        e_path = PATH_I_BP;
      else if (e_eff && ed <= 1) e_path = PATH_J_LZA;
      else e_path = PATH_K_LZB;
      #1;
      checks++;
      if (x !== ex_x || y !== ex_y || int'(d) != ed || eff_sub !== e_eff || path !== e_path) begin
        failures++;
        $display("FAIL a=%h b=%h sub=%b x=%h y=%h d=%0d path=%0d exp %h %h %0d %0d", a, b, sub,
                 x, y, d, path, ex_x, ex_y, ed, e_path);
      end
      seen[path]++;
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("paths I %0d J %0d K %0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
