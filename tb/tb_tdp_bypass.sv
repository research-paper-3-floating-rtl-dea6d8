// tb_tdp_bypass: bypass logic of the adder, directed cases with their IEEE
// results: NaN operands, infinity minus infinity (invalid), infinity plus
// infinity, infinity plus a number, signed zero sums, a zero plus a number,
// and an operand too small to change the larger one (inexact).
module tb_tdp_bypass;
  int checks = 0, failures = 0;
  logic [31:0] x, y, result;
  fp_pkg::fp_flags_t flags;

  tdp_bypass dut (.x(x), .y(y), .result(result), .flags(flags));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tcase(input logic [31:0] xi, input logic [31:0] yi,
                       input logic [31:0] e, input logic [4:0] f);
    x = xi; y = yi;
    #1;
    checks++;
    if (result !== e || flags !== f) begin
      failures++;
      $display("FAIL x=%h y=%h got %h/%b exp %h/%b", x, y, result, flags, e, f);
    end
  endtask

  initial begin
    tcase(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000, 5'b00000);  // NaN + 1
    tcase(32'h7F80_0000, 32'hFFA0_0000, 32'h7FC0_0000, 5'b00000);  // inf + NaN
    tcase(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000, 5'b00010);  // inf - inf
    tcase(32'hFF80_0000, 32'hFF80_0000, 32'hFF80_0000, 5'b00000);  // -inf + -inf
    tcase(32'hFF80_0000, 32'h4040_0000, 32'hFF80_0000, 5'b00000);  // -inf + 3
    tcase(32'h0000_0000, 32'h8000_0000, 32'h0000_0000, 5'b00000);  // +0 + -0
    tcase(32'h8000_0000, 32'h8000_0000, 32'h8000_0000, 5'b00000);  // -0 + -0
    tcase(32'hC0A0_0000, 32'h0000_0000, 32'hC0A0_0000, 5'b00000);  // -5 + 0
    tcase(32'h4C80_0000, 32'h3F80_0000, 32'h4C80_0000, 5'b00001);  // 2^26 + 1, d = 26
    tcase(32'h4D80_0000, 32'hBF80_0000, 32'h4D80_0000, 5'b00001);  // 2^28 - 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
