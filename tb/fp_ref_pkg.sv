// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Single precision operands are widened to double precision reals, the
// operation is done by the simulator in double precision, and the result is
// rounded back to single precision here (round to nearest even). For +, -, x
// and / of single precision operands the double precision intermediate has
// more than 2p+2 bits, so this double rounding gives the correctly rounded
// result. The conversion back uses an unbounded exponent first and then
// applies the range rules of the design: overflow to infinity, results below
// the smallest normal flushed to a signed zero. Denormal inputs read as zero.
package fp_ref_pkg;

  function automatic real sp2real(input logic [31:0] x);
    logic [63:0] bits;
    if (x[30:23] == 8'd0) return x[31] ? -0.0 : 0.0;
    bits = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(bits);
  endfunction

  // round a real to single precision; flags = {ovf, unf, dbz, inv, inx}
  function automatic logic [31:0] real2sp(input real v, output logic [4:0] flags);
    logic [63:0] bits;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] top;
    logic [28:0] rest;
    bits  = $realtobits(v);
    s     = bits[63];
    flags = '0;
    if (bits[62:0] == '0) return {s, 31'd0};
    e    = int'(bits[62:52]) - 1023;
    m    = {1'b1, bits[51:0]};
    top  = {1'b0, m[52:29]};
    rest = m[28:0];
    if (rest != 0) flags[0] = 1'b1;
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && top[0])) top = top + 25'd1;
    if (top[24]) begin
      top = top >> 1;
      e   = e + 1;
    end
    e = e + 127;
    if (e >= 255) begin
      flags[4] = 1'b1;
      flags[0] = 1'b1;
      return {s, 8'hFF, 23'd0};
    end
    if (e <= 0) begin
      flags[3] = 1'b1;
      flags[0] = 1'b1;
      return {s, 31'd0};
    end
    return {s, 8'(e), top[22:0]};
  endfunction

  function automatic bit is_nan(input logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic bit is_inf(input logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction
  function automatic bit is_zero(input logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // a + b (sub = 0) or a - b (sub = 1), special operands included
  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b,
                                          input logic sub, output logic [4:0] flags);
    logic [31:0] bb, r;
    bb    = {b[31] ^ sub, b[30:0]};
    flags = '0;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if (is_inf(a) && is_inf(bb)) begin
      if (a[31] != bb[31]) begin
        flags[1] = 1'b1;
        return QNAN;
      end
      return a;
    end
    if (is_inf(a)) return a;
    if (is_inf(bb)) return bb;
    if (is_zero(a) && is_zero(bb)) return {a[31] & bb[31], 31'd0};
    if (is_zero(a)) return bb;
    if (is_zero(bb)) return a;
    // when the exponents are more than 28 apart the double precision sum has
    // already lost the smaller operand; the exact sum then cannot be a single
    // precision number, so the result is inexact
    r = real2sp(sp2real(a) + sp2real(bb), flags);
    if (int'(a[30:23]) - int'(bb[30:23]) > 28 || int'(bb[30:23]) - int'(a[30:23]) > 28)
      flags[0] = 1'b1;
    return r;
  endfunction

  // round a real to single precision in rounding mode rm (0 nearest even,
  // 1 toward zero, 2 toward +infinity, 3 toward -infinity), with the same
  // flush to zero and flags as real2sp
  function automatic logic [31:0] real2sp_rm(input real v, input int rm, output logic [4:0] flags);
    logic [63:0] bits;
    logic        s, inc;
    int          e;
    logic [52:0] m;
    logic [24:0] top;
    logic [28:0] rest;
    bits  = $realtobits(v);
    s     = bits[63];
    flags = '0;
    if (bits[62:0] == '0) return {s, 31'd0};
    e    = int'(bits[62:52]) - 1023;
    m    = {1'b1, bits[51:0]};
    top  = {1'b0, m[52:29]};
    rest = m[28:0];
    if (rest != 0) flags[0] = 1'b1;
    case (rm)
      0:       inc = rest > 29'h1000_0000 || (rest == 29'h1000_0000 && top[0]);
      2:       inc = !s && rest != 0;
      3:       inc = s && rest != 0;
      default: inc = 1'b0;
    endcase
    if (inc) top = top + 25'd1;
    if (top[24]) begin
      top = top >> 1;
      e   = e + 1;
    end
    e = e + 127;
    if (e >= 255) begin
      flags[4] = 1'b1;
      flags[0] = 1'b1;
      if (rm == 1 || (rm == 2 && s) || (rm == 3 && !s)) return {s, 8'hFE, 23'h7F_FFFF};
      return {s, 8'hFF, 23'd0};
    end
    if (e <= 0) begin
      flags[3] = 1'b1;
      flags[0] = 1'b1;
      return {s, 31'd0};
    end
    return {s, 8'(e), top[22:0]};
  endfunction

  // a + b or a - b in rounding mode rm (see real2sp_rm)
  function automatic logic [31:0] ref_add_rm(input logic [31:0] a, input logic [31:0] b,
                                             input logic sub, input int rm,
                                             output logic [4:0] flags);
    logic [31:0] bb, x, r;
    real         v;
    bit          away;
    bb = {b[31] ^ sub, b[30:0]};
    if (rm == 0) return ref_add(a, b, sub, flags);
    flags = '0;
    if (is_nan(a) || is_nan(bb) || is_inf(a) || is_inf(bb)) return ref_add(a, b, sub, flags);
    if (is_zero(a) && is_zero(bb))
      return {(rm == 3) ? (a[31] | bb[31]) : (a[31] & bb[31]), 31'd0};
    if (is_zero(a)) return bb;
    if (is_zero(bb)) return a;
    if (int'(a[30:23]) - int'(bb[30:23]) > 28 || int'(bb[30:23]) - int'(a[30:23]) > 28) begin
      // the smaller operand only sets the sticky bit: the result is the
      // larger operand or its neighbour
      x        = (a[30:0] > bb[30:0]) ? a : bb;
      away     = (rm == 2 && !x[31]) || (rm == 3 && x[31]);
      flags[0] = 1'b1;
      if (a[31] == bb[31]) r = away ? x + 32'd1 : x;
      else                 r = away ? x : x - 32'd1;
      if (r[30:23] == 8'hFF) begin
        flags[4] = 1'b1;
        if (!away) r = r - 32'd1;
      end
      return r;
    end
    v = sp2real(a) + sp2real(bb);
    if (v == 0.0) return {rm == 3, 31'd0};
    return real2sp_rm(v, rm, flags);
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b,
                                          output logic [4:0] flags);
    logic s;
    s     = a[31] ^ b[31];
    flags = '0;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
      flags[1] = 1'b1;
      return QNAN;
    end
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    return real2sp(sp2real(a) * sp2real(b), flags);
  endfunction

  function automatic logic [31:0] ref_div(input logic [31:0] a, input logic [31:0] b,
                                          output logic [4:0] flags);
    logic s;
    s     = a[31] ^ b[31];
    flags = '0;
    if (is_nan(a) || is_nan(b)) return QNAN;
    if ((is_inf(a) && is_inf(b)) || (is_zero(a) && is_zero(b))) begin
      flags[1] = 1'b1;
      return QNAN;
    end
    if (is_inf(a)) return {s, 8'hFF, 23'd0};
    if (is_inf(b) || is_zero(a)) return {s, 31'd0};
    if (is_zero(b)) begin
      flags[2] = 1'b1;
      return {s, 8'hFF, 23'd0};
    end
    return real2sp(sp2real(a) / sp2real(b), flags);
  endfunction

  // 2 to the power k
  function automatic real pow2(input int k);
    real p = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) p = p * 2.0;
    else        for (int i = 0; i < -k; i++) p = p / 2.0;
    return p;
  endfunction

  // a random normal single precision number with exponent field in [lo, hi]
  function automatic logic [31:0] rand_sp(input int lo, input int hi);
    int e;
    e = lo + int'($urandom % (hi - lo + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
