// tb_barrel_rshift4: exhaustive check of the 4-bit right shift barrel
// shifter against the shift operator: all 16 words, all 4 shift amounts.
module tb_barrel_rshift4;
  int checks = 0, failures = 0;
  logic [3:0] x, y;
  logic [1:0] s;

  barrel_rshift4 dut (.x(x), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int k = 0; k < 4; k++) begin
        x = 4'(i);
        s = 2'(k);
        #1;
        checks++;
        if (y !== 4'(i >> k)) begin
          failures++;
          $display("FAIL x=%b s=%0d y=%b", x, k, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
