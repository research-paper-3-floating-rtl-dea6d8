// tb_dist_barrel_shifter: exhaustive check of the 8-bit distributed barrel
// shifter (every word, shift amount and fill value) against a right shift
// with fill, plus the worked path S0=1 S1=0 S2=1 that routes x5 to y0.
module tb_dist_barrel_shifter;
  int checks = 0, failures = 0;
  logic [7:0] x, y;
  logic [15:0] wide;
  logic       fill;
  logic [2:0] s;

  dist_barrel_shifter dut (.x(x), .fill(fill), .s(s), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 256; i++) begin
        for (int k = 0; k < 8; k++) begin
          x    = 8'(i);
          fill = 1'(f);
          s    = 3'(k);
          wide = {{8{fill}}, x} >> k;
          #1;
          checks++;
          if (y !== wide[7:0]) begin
            failures++;
            $display("FAIL x=%b fill=%b s=%0d y=%b", x, fill, k, y);
          end
        end
      end
    end
    // worked path: only x5 set, shift 5 -> only y0 set
    x = 8'b0010_0000; fill = 1'b0; s = 3'b101;
    #1;
    checks++;
    if (y !== 8'b0000_0001) begin
      failures++;
      $display("FAIL worked path y=%b", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
