// tb_norm_shifter: exhaustive check of the 8-bit normalization shifter
// (every word and every SEL2..SEL0) against a left shift with zero fill.
module tb_norm_shifter;
  int checks = 0, failures = 0;
  logic [7:0] a, y;
  logic [2:0] sel;

  norm_shifter dut (.a(a), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 8; k++) begin
        a   = 8'(i);
        sel = 3'(k);
        #1;
        checks++;
        if (y !== 8'((i << k) & 255)) begin
          failures++;
          $display("FAIL a=%b sel=%0d y=%b", a, k, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
