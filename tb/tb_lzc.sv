// tb_lzc: leading zero counter at 25 bits: zero, every single set bit, and
// random words, against a count made from the MSB down.
module tb_lzc;
  int checks = 0, failures = 0;
  logic [24:0] x;
  logic [4:0]  cnt;
  int          expv;

  lzc #(.W(25)) dut (.x(x), .cnt(cnt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [24:0] v);
    x = v;
    expv = 0;
    while (expv < 25 && v[24 - expv] == 1'b0) expv++;
    #1;
    checks++;
    if (int'(cnt) != expv) begin
      failures++;
      $display("FAIL x=%b cnt=%0d exp=%0d", x, cnt, expv);
    end
  endtask

  initial begin
    run('0);
    for (int i = 0; i < 25; i++) run(25'(1) << i);
    for (int i = 0; i < 2000; i++) run(25'($urandom) >> ($urandom % 25));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
