// tb_lza: the leading-zero anticipator. At W = 10 every pair A >= B is tried;
// at the default W = 56 random pairs with long runs of equal leading bits
// are tried. The anticipated count must equal the true leading-zero count of
// A - B or be one less, and both cases must occur. A = B must give W.
module tb_lza;
  int checks = 0, failures = 0;
  logic [9:0]  a10, b10;
  logic [3:0]  c10;
  logic [55:0] a56, b56;
  logic [5:0]  c56;
  int          n_exact = 0, n_short = 0;

  lza #(.W(10)) dut10 (.a(a10), .b_inv(~b10), .cnt(c10));
  lza           dut56 (.a(a56), .b_inv(~b56), .cnt(c56));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lz_of(input logic [55:0] v, input int w);
    for (int i = w - 1; i >= 0; i--) if (v[i]) return w - 1 - i;
    return w;
  endfunction

  task automatic judge(input int got, input int truth, input int w, input string what);
    checks++;
    if (truth == w ? got != w : !(got == truth || got == truth - 1)) begin
      failures++;
      $display("FAIL %s: anticipated %0d, true %0d", what, got, truth);
    end
    if (truth < w) begin
      if (got == truth) n_exact++;
      else if (got == truth - 1) n_short++;
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      for (int j = 0; j <= i; j++) begin
        a10 = 10'(i);
        b10 = 10'(j);
        #1;
        judge(int'(c10), lz_of(56'(a10 - b10), 10), 10, "W=10");
      end
    end
    for (int i = 0; i < 20000; i++) begin
      logic [55:0] t, m;
      a56 = {$urandom, $urandom};
      m   = {56{1'b1}} >> (i % 57);                 // share the leading bits
      b56 = (a56 & ~m) | ({$urandom, $urandom} & m);
      if (b56 > a56) begin t = a56; a56 = b56; b56 = t; end
      #1;
      judge(int'(c56), lz_of(a56 - b56, 56), 56, "W=56");
    end
    checks += 2;
    if (n_exact == 0) failures++;
    if (n_short == 0) failures++;
    $display("exact %0d, one short %0d", n_exact, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
