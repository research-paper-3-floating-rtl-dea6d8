// tb_dpfadd: the two-path (FAR/CLOSE) adder. Random additions and
// subtractions in all four rounding modes are compared bit for bit with the
// real-number reference, flags included. The operand mix covers every path and every rounding
// situation of the merged rounding: close-path cancellation and exact zeros,
// close-path ties, far-path additions with and without a carry out,
// far-path subtractions that need a left shift, exponent gaps past the
// significand width, special operands, overflow and underflow. Each of these
// must happen at least once, and the far_path/bypass indicators must match the
// path the operands call for.
module tb_dpfadd;
  import fp_ref_pkg::*;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, result, expr;
  logic        sub, far_path, bypass;
  rmode_t      rm;
  int          n_rm [4];
  fp_flags_t   flags;
  logic [4:0]  eflags;
  int n_close = 0, n_far = 0, n_bypass = 0, n_close_rnd = 0, n_carry = 0;
  int n_lshift = 0, n_big_gap = 0, n_ovf = 0, n_unf = 0, n_zero = 0;

  dpfadd dut (.a(a), .b(b), .sub(sub), .rm(rm), .result(result), .flags(flags),
              .far_path(far_path), .bypass(bypass));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exponent fields, larger magnitude first, and whether the operation is an
  // effective subtraction
  function automatic void order(input logic [31:0] pa, input logic [31:0] pb, input logic ps,
                                output int ex, output int ey, output bit es);
    logic [31:0] bb;
    bb = {pb[31] ^ ps, pb[30:0]};
    if (pb[30:0] > pa[30:0]) begin ex = int'(bb[30:23]); ey = int'(pa[30:23]); end
    else                     begin ex = int'(pa[30:23]); ey = int'(bb[30:23]); end
    es = pa[31] != bb[31];
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int kind, e1, gap, ex, ey;
      bit es, spec;
      kind = i % 8;
      e1   = 3 + int'($urandom % 250);
      sub  = 1'($urandom);
      rm   = rmode_t'($urandom % 4);
      n_rm[int'(rm)]++;
      case (kind)
        0, 1: begin                                      // close: gap 0 or 1
          a = rand_sp(e1, e1);
          b = rand_sp(e1 - int'($urandom % 2), e1);
          if (kind == 1) b[22:0] = a[22:0] ^ 23'($urandom % 8);
          b[31] = a[31] ^ ~sub;
        end
        2, 3: begin                                      // far, small gaps
          gap = int'($urandom % 6);
          a = rand_sp(e1, e1);
          b = rand_sp(e1 - gap, e1 - gap);
        end
        4: begin                                         // far, any gap up to 30
          gap = int'($urandom % 31);
          a = rand_sp(e1, e1);
          b = (e1 - gap >= 1) ? rand_sp(e1 - gap, e1 - gap) : rand_sp(1, 1);
          if ($urandom % 4 == 0) b[22:0] = '1;
          if ($urandom % 4 == 0) a[22:0] = '0;
        end
        5: begin                                         // edges of the range
          a = ($urandom % 2) ? rand_sp(250, 254) : rand_sp(1, 4);
          b = {1'($urandom), a[30:23] - 8'($urandom % 2), 23'($urandom)};
        end
        6: begin                                         // special operands
          a = rand_sp(1, 254);
          b = rand_sp(1, 254);
          case ($urandom % 4)
            0: a[30:23] = 8'hFF;
            1: b[30:0] = {8'hFF, 23'($urandom % 2)};
            2: a[30:0] = '0;
            default: begin a[30:0] = {8'hFF, 23'd0}; b[30:0] = {8'hFF, 23'd0}; end
          endcase
        end
        default: begin                                   // fully random
          a = rand_sp(1, 254);
          b = rand_sp(1, 254);
        end
      endcase
      if (i % 211 == 0) begin b = a; sub = 1'b1; end    // exact zero
      expr = ref_add_rm(a, b, sub, int'(rm), eflags);
      order(a, b, sub, ex, ey, es);
      spec = ex == 255 || ey == 255 || ex == 0 || ey == 0;
      #1;
      checks++;
      if (result !== expr || flags !== eflags) begin
        failures++;
        $display("FAIL a=%h b=%h sub=%0d rm=%0d got %h/%b exp %h/%b", a, b, sub, rm, result, flags, expr, eflags);
      end
      checks++;
      if (bypass !== spec || far_path !== (!spec && !(es && ex - ey <= 1))) begin
        failures++;
        $display("FAIL path a=%h b=%h sub=%0d far_path=%0d bypass=%0d", a, b, sub, far_path, bypass);
      end
      if (bypass) n_bypass++;
      else if (far_path) begin
        n_far++;
        if (!es && result[30:23] == 8'(ex + 1)) n_carry++;
        if (es && result[30:23] == 8'(ex - 1)) n_lshift++;
        if (ex - ey > 25) n_big_gap++;
      end else begin
        n_close++;
        if (flags.inx) n_close_rnd++;
        if (result == 0) n_zero++;
      end
      if (flags.ovf) n_ovf++;
      if (flags.unf) n_unf++;
    end
    $display("close %0d (rounded %0d, zero %0d), far %0d (carry %0d, left shift %0d, gap>25 %0d), bypass %0d, ovf %0d, unf %0d",
             n_close, n_close_rnd, n_zero, n_far, n_carry, n_lshift, n_big_gap, n_bypass, n_ovf, n_unf);
    checks += 11;
    if (n_rm[0] == 0 || n_rm[1] == 0 || n_rm[2] == 0 || n_rm[3] == 0) failures++;
    if (n_close == 0) failures++;
    if (n_close_rnd == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_far == 0) failures++;
    if (n_carry == 0) failures++;
    if (n_lshift == 0) failures++;
    if (n_big_gap == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_unf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
