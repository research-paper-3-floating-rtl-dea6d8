// tb_tdp_lza_path: close path of the adder on its own. Random effective
// subtractions with exponent difference 0 or 1, ordered by magnitude, are
// compared with the real-number reference, including operands close enough
// to cancel many leading bits, exact zero results and results below the
// smallest normal (flushed to zero).
module tb_tdp_lza_path;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] x, y, t, result, expr;
  logic        d1;
  fp_pkg::fp_flags_t flags;
  logic [4:0]  eflags;
  int          n_big_shift = 0, n_zero = 0, n_unf = 0, n_round = 0;

  tdp_lza_path dut (.x(x), .y(y), .d1(d1), .result(result), .flags(flags));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      int e1;
      e1 = (i % 10 == 0) ? 1 + int'($urandom % 3) : 2 + int'($urandom % 252);
      x  = rand_sp(e1, e1);
      y  = rand_sp(e1 - int'($urandom % 2), e1);
      if (y[30:23] == 0) y[30:23] = 8'd1;
      if (i % 3 == 0) y[22:0] = x[22:0] ^ 23'($urandom % 16);   // heavy cancellation
      if (i % 97 == 0) y[30:0] = x[30:0];                       // exact zero
      y[31] = ~x[31];
      if (y[30:0] > x[30:0]) begin t = x; x = y; y = t; end
      d1 = (x[30:23] - y[30:23]) == 8'd1;
      expr = ref_add(x, y, 1'b0, eflags);
      #1;
      checks++;
      if (result !== expr || flags !== eflags) begin
        failures++;
        $display("FAIL x=%h y=%h got %h/%b exp %h/%b", x, y, result, flags, expr, eflags);
      end
      if (result[30:23] + 8'd4 < x[30:23] && result[30:23] != 0) n_big_shift++;
      if (result == 0) n_zero++;
      if (flags.unf) n_unf++;
      if (flags.inx && !flags.unf) n_round++;
    end
    checks += 4;
    if (n_big_shift == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_unf == 0) failures++;
    if (n_round == 0) failures++;
    $display("large shifts %0d, zeros %0d, underflows %0d, rounded %0d", n_big_shift, n_zero, n_unf, n_round);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
