// tb_tpfadd_double: both triple path adders at double precision (EW = 11,
// FW = 52, a 56-bit far-path adder). Random double precision operands from
// every path (close exponents with cancellation, distant exponents, gaps
// beyond p+1) are added and subtracted; the simulator's own double precision
// sum, which is correctly rounded to nearest even, is the reference. Operand
// exponents stay in the middle of the range, so no result overflows or
// underflows and only the result words are compared.
module tb_tpfadd_double;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, in_valid = 0, sub = 0;
  logic [63:0] a = 0, b = 0, r3, r6;
  logic        v3, v6;
  fp_flags_t   f3, f6;
  tdp_path_t   s3, s6;
  int          cyc = 0;
  logic [63:0] q3[$], q6[$];
  int          n_path [3];

  tdpfadd #(.EW(11), .FW(52)) dut3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
      .sub(sub), .out_valid(v3), .result(r3), .flags(f3), .state(s3));
  tpfadd_pipe #(.EW(11), .FW(52)) dut6 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
      .sub(sub), .out_valid(v6), .result(r6), .flags(f6), .state(s6));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    n_path[s3]++;
    if (v3) begin
      logic [63:0] e;
      e = q3.pop_front();
      checks++;
      if (r3 !== e) begin failures++; $display("FAIL 3-bank adder got %h exp %h", r3, e); end
    end
    if (v6) begin
      logic [63:0] e;
      e = q6.pop_front();
      checks++;
      if (r6 !== e) begin failures++; $display("FAIL 5-stage adder got %h exp %h", r6, e); end
    end
  end

  function automatic logic [63:0] rand_dp(input int e);
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

  initial begin
    real ra, rb;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int e1;
      @(negedge clk);
      e1 = 900 + int'($urandom % 200);
      a  = rand_dp(e1);
      case (i % 4)
        0: begin b = rand_dp(e1 - int'($urandom % 2)); b[51:0] = a[51:0] ^ 52'($urandom % 256); end
        1: b = rand_dp(e1 - int'($urandom % 60));
        2: b = rand_dp(e1 - 50 - int'($urandom % 40));
        default: b = rand_dp(e1 - int'($urandom % 4));
      endcase
      sub = 1'($urandom);
      in_valid = 1;
      ra = $bitstoreal(a);
      rb = $bitstoreal(b);
      q3.push_back($realtobits(sub ? ra - rb : ra + rb));
      q6.push_back($realtobits(sub ? ra - rb : ra + rb));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks += 4;
    if (q3.size() != 0 || q6.size() != 0) failures++;
    for (int k = 0; k < 3; k++) if (n_path[k] == 0) failures++;
    $display("states I %0d J %0d K %0d", n_path[0], n_path[1], n_path[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
