// tb_fp_div: divider, single precision. Directed special cases (0/0,
// inf/inf, x/0 with divide-by-zero, inf/x, x/inf, NaN) and random normal
// operands over the whole exponent range against the real-number reference;
// quotients needing the normalizing left shift, overflows and underflows
// must all occur.
module tb_fp_div;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, result, expr;
  fp_pkg::fp_flags_t flags;
  logic [4:0]  eflags;
  int          n_shift = 0, n_ovf = 0, n_unf = 0;

  fp_div dut (.a(a), .b(b), .result(result), .flags(flags));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tcase(input logic [31:0] ai, input logic [31:0] bi);
    a = ai; b = bi;
    expr = ref_div(a, b, eflags);
    #1;
    checks++;
    if (result !== expr || flags !== eflags) begin
      failures++;
      $display("FAIL a=%h b=%h got %h/%b exp %h/%b", a, b, result, flags, expr, eflags);
    end
  endtask

  initial begin
    tcase(32'h00000000, 32'h80000000);   // 0/0
    tcase(32'h7F800000, 32'hFF800000);   // inf/inf
    tcase(32'hC0400000, 32'h00000000);   // -3/0
    tcase(32'h7F800000, 32'h40400000);   // inf/3
    tcase(32'h40400000, 32'hFF800000);   // 3/-inf
    tcase(32'h7FC00000, 32'h40400000);   // NaN/3
    tcase(32'h3F800000, 32'h40400000);   // 1/3
    for (int i = 0; i < 5000; i++) begin
      a = rand_sp(1, 254);
      b = rand_sp(1, 254);
      tcase(a, b);
      if ({1'b1, a[22:0]} < {1'b1, b[22:0]}) n_shift++;
      if (flags.ovf) n_ovf++;
      if (flags.unf) n_unf++;
    end
    checks += 3;
    if (n_shift == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_unf == 0) failures++;
    $display("left shifts %0d, overflows %0d, underflows %0d", n_shift, n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
