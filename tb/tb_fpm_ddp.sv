// tb_fpm_ddp: pipelined double data path multiplier, run at single
// precision (EW = 8, FW = 23) so that the real-number reference is exact.
// A random stream with bubbles mixes normal operands (products in [1, 2) and
// [2, 4), overflow, underflow) with special operands that take the bypass
// path. Each result is compared with the reference and must appear on the
// fourth rising edge counting the one that sampled the operands; the
// bypassed output must be set exactly for special operands. The published
// single precision cases are run first.
module tb_fpm_ddp;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid, bypassed;
  logic [31:0] a = 0, b = 0, result;
  fp_pkg::fp_flags_t flags;
  int          cyc = 0;
  typedef struct {
    logic [31:0] res;
    logic [4:0]  flg;
    logic        byp;
    int          due;
  } exp_t;
  exp_t q[$];
  int   n_byp = 0, n_mul = 0, n_hi = 0, n_ovf = 0, n_unf = 0;

  fpm_ddp #(.EW(8), .FW(23)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                                  .out_valid(out_valid), .result(result), .flags(flags),
                                  .bypassed(bypassed));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (e.due != cyc || result !== e.res || flags !== e.flg || bypassed !== e.byp) begin
          failures++;
          $display("FAIL cycle %0d due %0d got %h/%b/%b exp %h/%b/%b", cyc, e.due, result, flags,
                   bypassed, e.res, e.flg, e.byp);
        end
        if (bypassed) n_byp++; else n_mul++;
        if (flags.ovf) n_ovf++;
        if (flags.unf) n_unf++;
      end
    end
  end

  task automatic send(input logic [31:0] ai, input logic [31:0] bi);
    exp_t e;
    logic [4:0] f;
    @(negedge clk);
    in_valid = 1;
    a = ai; b = bi;
    e.res = ref_mul(ai, bi, f);
    e.flg = f;
    e.byp = is_nan(ai) || is_nan(bi) || is_inf(ai) || is_inf(bi) || is_zero(ai) || is_zero(bi);
    e.due = cyc + 4;
    if (!e.byp && {1'b1, ai[22:0]} * {1'b1, bi[22:0]} >= 48'h8000_0000_0000) n_hi++;
    q.push_back(e);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(32'h408051EB, 32'h40566666);
    send(32'h40066666, 32'h40066666);
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] x, y;
      x = rand_sp(1, 254);
      y = rand_sp(1, 254);
      case ($urandom % 8)
        0: y = {1'($urandom), 8'h00, 23'd0};
        1: y = {1'($urandom), 8'hFF, 23'($urandom % 2)};
        2: begin x = {1'($urandom), 8'hFF, 23'd0}; y = {1'($urandom), 8'h00, 23'd0}; end
        default: ;
      endcase
      send(x, y);
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks += 6;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    if (n_byp == 0) failures++;
    if (n_mul == 0) failures++;
    if (n_hi == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_unf == 0) failures++;
    $display("bypassed %0d multiplied %0d (in [2,4): %0d) ovf %0d unf %0d", n_byp, n_mul, n_hi, n_ovf, n_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
