// tb_fpadd_lza: the pipelined adder with leading-zero anticipation at its
// default size, double precision (a 56-bit significand adder). A stream of
// random additions and subtractions, with gaps in in_valid, covers heavy
// cancellation, every exponent gap from 0 to beyond the significand width,
// carries out of additions, special operands, overflow and underflow. The
// reference is the simulator's own double precision arithmetic, which rounds
// to nearest even. Its inexact flag comes from the exact error term of the
// sum (the "two-sum" identity), and its results below the smallest normal
// number are flushed to zero. Every result must come out 4 rising edges
// after its operands were sampled. The testbench counts how often the
// anticipated shift needed the one-bit compensation, and how often it did
// not; both must happen, as must every flag and path listed above.
module tb_fpadd_lza;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, in_valid = 0, sub = 0, out_valid;
  logic [63:0] a = 0, b = 0, result;
  fp_flags_t   flags;
  int          cyc = 0;

  typedef struct {
    logic [63:0] res;
    logic [4:0]  flg;
    int          due;
  } exp_t;
  exp_t q[$];
  int n_comp = 0, n_exact_lz = 0, n_carry = 0, n_big_lz = 0, n_spec = 0;
  int n_ovf = 0, n_unf = 0, n_inv = 0, n_inx = 0, n_zero = 0;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  fpadd_lza dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .sub(sub),
                 .out_valid(out_valid), .result(result), .flags(flags));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rand_dp(input int e);
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

  function automatic bit is_nan(input logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] != 0;
  endfunction
  function automatic bit is_inf(input logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] == 0;
  endfunction

  // reference sum with flags {ovf, unf, dbz, inv, inx}
  function automatic void ref_add(input logic [63:0] pa, input logic [63:0] pb, input logic ps,
                                  output logic [63:0] r, output logic [4:0] f);
    real ra, rb, s, bv, av, err;
    logic [63:0] bb;
    bb = {pb[63] ^ ps, pb[62:0]};
    f  = '0;
    if (is_nan(pa) || is_nan(bb)) begin r = QNAN; return; end
    if (is_inf(pa) && is_inf(bb) && pa[63] != bb[63]) begin r = QNAN; f[1] = 1'b1; return; end
    ra = $bitstoreal(pa);
    rb = $bitstoreal(bb);
    s  = ra + rb;
    r  = $realtobits(s);
    if (is_inf(pa) || is_inf(bb)) return;
    if (is_inf(r)) begin f[4] = 1'b1; f[0] = 1'b1; return; end
    bv  = s - ra;
    av  = s - bv;
    err = (ra - av) + (rb - bv);
    if (err != 0.0) f[0] = 1'b1;
    if (r[62:52] == 0 && r[51:0] != 0) begin      // below the normal range
      r    = {r[63], 63'd0};
      f[3] = 1'b1;
      f[0] = 1'b1;
    end
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (cyc != e.due || result !== e.res || flags !== e.flg) begin
      failures++;
      $display("FAIL cyc %0d due %0d got %h/%b exp %h/%b", cyc, e.due, result, flags, e.res, e.flg);
    end
    if (dut.spec4) n_spec++;
    else if (!dut.sub3 && dut.sum3[56]) n_carry++;
    if (flags.ovf) n_ovf++;
    if (flags.unf) n_unf++;
    if (flags.inv) n_inv++;
    if (flags.inx) n_inx++;
    if (!dut.spec4 && result[62:0] == 0 && !flags.unf) n_zero++;
  end

  // the anticipated count, seen where the compensation shifter acts
  always @(negedge clk) if (rst_n && dut.v4 && !dut.spec4 && !dut.zero4 && dut.e4 != dut.ec) begin
    n_comp++;
  end
  always @(negedge clk) if (rst_n && dut.v3 && dut.sub3 && dut.sum3[55:0] != 0) begin
    if (dut.lz3 >= 6) n_big_lz++;
    if (dut.shifted[55]) n_exact_lz++;
  end

  initial begin
    exp_t t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int e1, kind;
      @(negedge clk);
      if (i % 7 == 3) begin
        in_valid = 0;
        continue;
      end
      kind = i % 9;
      e1   = 2 + int'($urandom % 2044);
      a    = rand_dp(e1);
      case (kind)
        0, 1: begin                                  // cancellation
          b = rand_dp(e1 - int'($urandom % 2));
          b[51:0] = a[51:0] ^ 52'($urandom % (1 << (i % 30)));
          b[63] = a[63];
          sub = 1;
        end
        2: b = rand_dp(e1 - int'($urandom % 60) < 1 ? 1 : e1 - int'($urandom % 60));
        3: b = rand_dp(e1 - int'($urandom % 4) < 1 ? 1 : e1 - int'($urandom % 4));
        4: begin                                     // overflow or underflow
          a = ($urandom % 2) ? rand_dp(2044 + int'($urandom % 3)) : rand_dp(1 + int'($urandom % 2));
          b = {1'($urandom), a[62:52], 52'({$urandom, $urandom})};
        end
        5: begin                                     // special operands
          b = rand_dp(e1);
          case ($urandom % 4)
            0: a[62:0] = '0;
            1: b[62:0] = {11'h7FF, 52'($urandom % 2)};
            2: begin a[62:0] = {11'h7FF, 52'd0}; b[62:0] = {11'h7FF, 52'd0}; end
            default: begin a[62:0] = '0; b[62:0] = '0; end
          endcase
        end
        6: b = {a[63] ^ 1'($urandom), a[62:0]};      // exact zero or doubling
        default: b = rand_dp(2 + int'($urandom % 2044));
      endcase
      if (kind > 1) sub = 1'($urandom);
      in_valid = 1;
      ref_add(a, b, sub, t.res, t.flg);
      t.due = cyc + 4;
      q.push_back(t);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    $display("compensation shifts %0d, exact anticipations %0d, long shifts %0d, carries %0d, specials %0d",
             n_comp, n_exact_lz, n_big_lz, n_carry, n_spec);
    $display("ovf %0d unf %0d inv %0d inx %0d zero %0d", n_ovf, n_unf, n_inv, n_inx, n_zero);
    checks += 11;
    if (q.size() != 0) failures++;
    if (n_comp == 0) failures++;
    if (n_exact_lz == 0) failures++;
    if (n_big_lz == 0) failures++;
    if (n_carry == 0) failures++;
    if (n_spec == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_unf == 0) failures++;
    if (n_inv == 0) failures++;
    if (n_inx == 0) failures++;
    if (n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
