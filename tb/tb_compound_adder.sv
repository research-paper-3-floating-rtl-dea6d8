// tb_compound_adder: compound adder at N = 24 in all four rounding modes.
// The expected result is worked out on exact integers scaled by 8 (three
// fraction bits g, r, s): A*8 +/- (B*8 + grs), then rounded at the LSB by the
// mode's rule. Subtractions with non-zero g,r,s use A > B; subtractions with
// g=r=s=0 also cover B > A (result |A - B|). Every 97th case makes every bit
// of A and B' propagate (A + ~A, or A - A), where the +1 sum hinges on the
// topmost prefix flag; that case must occur.
module tb_compound_adder;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic [23:0] a, b, y;
  logic        sub, g, r, s, sign, cout, inexact;
  rmode_t      rm;
  longint      v8, mag, q, fr;
  logic        inc;
  int          mode_seen [4];
  int          n_allp = 0;

  compound_adder dut (.a(a), .b(b), .sub(sub), .g(g), .r(r), .s(s), .rm(rm),
                      .sign(sign), .y(y), .cout(cout), .inexact(inexact));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8000; i++) begin
      a    = 24'($urandom);
      b    = 24'($urandom) >> ($urandom % 24);
      sub  = 1'($urandom);
      {g, r, s} = ($urandom % 4 == 0) ? 3'b000 : 3'($urandom);
      if (i % 50 == 0) {g, r, s} = 3'b100;          // ties
      if (i % 97 == 1) begin                         // all bits propagate
        b = sub ? a : ~a;
        if (sub) {g, r, s} = 3'b000;
      end
      if ((a ^ (b ^ {24{sub}})) == '1) n_allp++;
      rm   = rmode_t'($urandom % 4);
      sign = 1'($urandom);
      if (sub && {g, r, s} != 0 && a <= b) a = b + 24'd1 + 24'($urandom % 1000);
      if (sub && {g, r, s} != 0 && a <= b) b = a - 24'd1;
      v8  = sub ? (longint'(a) * 8 - (longint'(b) * 8 + longint'({g, r, s})))
                : (longint'(a) * 8 + (longint'(b) * 8 + longint'({g, r, s})));
      mag = (v8 < 0) ? -v8 : v8;
      q   = mag >> 3;
      fr  = mag & 7;
      case (rm)
        RM_NEAREST_EVEN: inc = (fr > 4) || (fr == 4 && q[0]);
        RM_TOWARD_ZERO:  inc = 0;
        RM_TOWARD_POS:   inc = !sign && fr != 0;
        default:         inc = sign && fr != 0;
      endcase
      q = q + longint'(inc);
      mode_seen[rm]++;
      #1;
      checks++;
      if (y !== 24'(q) || inexact !== (fr != 0) || (!sub && cout !== q[24])) begin
        failures++;
        $display("FAIL a=%h b=%h sub=%b grs=%b%b%b rm=%0d sign=%b y=%h cout=%b exp %h", a, b, sub,
                 g, r, s, rm, sign, y, cout, 24'(q));
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_seen[m] == 0) failures++;
    end
    checks++;
    if (n_allp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
