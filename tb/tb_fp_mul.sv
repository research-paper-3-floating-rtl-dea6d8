// tb_fp_mul: single data path multiplier, single precision.
// 1. The two published cases: 4.01 x 3.35 -> 13.4335 (0x408051EB x 0x40566666
//    = 0x4156EF9C) and 2.1 x 2.1 (0x40066666 squared = 0x408D1EB7).
// 2. Special operands: NaN, zero times infinity, infinity, zeros.
// 3. Random normal operands over the whole exponent range (overflow and
//    underflow included) against the real-number reference; products in
//    [2, 4) (normalizing shift) and overflows must both occur.
module tb_fp_mul;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, result, expr;
  fp_pkg::fp_flags_t flags;
  logic [4:0]  eflags;
  int          n_shift = 0, n_ovf = 0, n_unf = 0;

  fp_mul dut (.a(a), .b(b), .result(result), .flags(flags));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tcase(input logic [31:0] ai, input logic [31:0] bi,
                       input logic [31:0] e, input logic [4:0] f);
    a = ai; b = bi;
    #1;
    checks++;
    if (result !== e || flags !== f) begin
      failures++;
      $display("FAIL a=%h b=%h got %h/%b exp %h/%b", a, b, result, flags, e, f);
    end
  endtask

  initial begin
    // published cases: exact flags are not printed for them, only the words
    a = 32'h408051EB; b = 32'h40566666; #1; checks++;
    if (result !== 32'h4156EF9C) begin failures++; $display("FAIL case 1: %h", result); end
    a = 32'h40066666; b = 32'h40066666; #1; checks++;
    if (result !== 32'h408D1EB7) begin failures++; $display("FAIL case 2: %h", result); end
    // specials
    tcase(32'h7FC00000, 32'h3F800000, 32'h7FC00000, 5'b00000);
    tcase(32'h7F800000, 32'h00000000, 32'h7FC00000, 5'b00010);
    tcase(32'h80000000, 32'hFF800000, 32'h7FC00000, 5'b00010);
    tcase(32'hFF800000, 32'h40000000, 32'hFF800000, 5'b00000);
    tcase(32'h80000000, 32'h40000000, 32'h80000000, 5'b00000);
    // random
    for (int i = 0; i < 5000; i++) begin
      a = rand_sp(1, 254);
      b = (i % 2) ? rand_sp(1, 254) : rand_sp(254 - int'(a[30:23]) > 0 ? 254 - int'(a[30:23]) : 1,
                                              254 - int'(a[30:23]) + 3 < 254 ? 254 - int'(a[30:23]) + 3 : 254);
      if (i % 5 == 0) b[22:0] = '1;
      expr = ref_mul(a, b, eflags);
      #1;
      checks++;
      if (result !== expr || flags !== eflags) begin
        failures++;
        $display("FAIL a=%h b=%h got %h/%b exp %h/%b", a, b, result, flags, expr, eflags);
      end
      if ({1'b1, a[22:0]} * {1'b1, b[22:0]} >= 48'h8000_0000_0000) n_shift++;
      if (flags.ovf) n_ovf++;
      if (flags.unf) n_unf++;
    end
    checks += 3;
    if (n_shift == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_unf == 0) failures++;
    $display("normalizing shifts %0d, overflows %0d, underflows %0d", n_shift, n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
