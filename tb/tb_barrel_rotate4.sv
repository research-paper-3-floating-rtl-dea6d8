// tb_barrel_rotate4: exhaustive check of the 4-bit rotator against the
// select table: S=00 D3 D2 D1 D0, S=01 D2 D1 D0 D3, S=10 D1 D0 D3 D2,
// S=11 D0 D3 D2 D1.
module tb_barrel_rotate4;
  int checks = 0, failures = 0;
  logic [3:0] d, y, exp_y;
  logic [1:0] s;

  barrel_rotate4 dut (.d(d), .s(s), .y(y));

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
        d = 4'(i);
        s = 2'(k);
        case (k)
          0: exp_y = {d[3], d[2], d[1], d[0]};
          1: exp_y = {d[2], d[1], d[0], d[3]};
          2: exp_y = {d[1], d[0], d[3], d[2]};
          default: exp_y = {d[0], d[3], d[2], d[1]};
        endcase
        #1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL d=%b s=%0d y=%b exp=%b", d, k, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
