// tb_rshift_grs: exhaustive check of the 8-bit alignment shifter with G, R
// and S outputs for every word and every 5-bit shift amount. The expected
// bits are worked out with integer arithmetic: c = a >> n, G is bit n-1 of a,
// R is bit n-2, S is set when any bit below n-2 is set.
module tb_rshift_grs;
  int checks = 0, failures = 0;
  logic [7:0] a, c;
  logic [4:0] sh;
  logic       g, r, s;
  logic       eg, er, es;

  rshift_grs dut (.a(a), .sh(sh), .c(c), .g(g), .r(r), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int n = 0; n < 32; n++) begin
        a  = 8'(i);
        sh = 5'(n);
        eg = (n >= 1) ? 1'((i >> (n - 1)) & 1) : 1'b0;
        er = (n >= 2) ? 1'((i >> (n - 2)) & 1) : 1'b0;
        es = (n >= 3) ? ((i & ((1 << (n - 2)) - 1)) != 0) : 1'b0;
        #1;
        checks++;
        if (c !== 8'(i >> n) || g !== eg || r !== er || s !== es) begin
          failures++;
          $display("FAIL a=%b sh=%0d c=%b grs=%b%b%b exp %b%b%b", a, n, c, g, r, s, eg, er, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
