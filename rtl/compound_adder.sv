// compound_adder: compound significand adder with rounding by selection.
//
// It delivers both A + B' (+0) and A + B' + 1 (+1) of opA and opB XOR sub.
// Rounding never needs a third, slower addition: the rounding logic looks at
// the guard, round and sticky bits and only chooses between the two sums.
// The +1 sum comes from a flagged prefix adder rather than from a second
// carry chain. Its flag for bit i is the group propagate of bits i-1..0 of
// A and B', built by a log-depth prefix tree. Bit i of the +0 sum is inverted
// exactly when that flag is set, because the lower sum bits are then all
// ones. The flag above the top bit is the carry out added by the +1.
//   effective addition      A + B (+0) or A + B + 1 (+1)
//   subtraction, g=r=s=0    A - B = A + ~B + 1 when it carries out;
//                           otherwise B - A = ~(A + ~B), the complemented +0 sum
//   subtraction, grs != 0   opA > opB is required. The value is
//                           (A - B - 1) + (1 - 0.grs): the integer part is the
//                           +0 sum, the fraction bits are the two's complement
//                           of g,r,s, and rounding up selects the +1 sum (A - B)
// Rounding modes (rmode_t): nearest even adds one when g' and (LSB or r' or
// s'); toward zero truncates; toward +inf adds one for a positive result with
// any fraction bit set; toward -inf likewise for a negative result.
// Rounding is made at the N-bit LSB: the one-bit normalizing shift after a
// carry out of an addition belongs to the surrounding path, not to this
// block. Combinational.
module compound_adder
  import fp_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  input  logic         g,
  input  logic         r,
  input  logic         s,
  input  rmode_t       rm,
  input  logic         sign,
  output logic [N-1:0] y,
  output logic         cout,
  output logic         inexact
);
  logic [N-1:0] bx;
  logic [N:0]   sum0, sum1;     // the +0 and +1 sums
  logic [N:0]   flag;           // flag[i] = propagate of bits i-1..0
  logic [2:0]   frac;           // rounding bits of the exact result
  logic         any, inc;

  assign bx   = b ^ {N{sub}};
  assign sum0 = {1'b0, a} + {1'b0, bx};

  // flagged prefix: a Kogge-Stone tree over the propagate bits only
  always_comb begin
    flag = {(a ^ bx), 1'b1};
    for (int d = 1; d <= N; d = d * 2)
      for (int i = N; i >= d; i--)
        flag[i] = flag[i] & flag[i-d];
  end

  assign sum1 = sum0 ^ flag;

  always_comb begin
    // rounding logic (g, r, s)
    frac = sub ? (3'(~{g, r, s}) + 3'd1) : {g, r, s};
    any  = |frac;
    unique case (rm)
      RM_NEAREST_EVEN: inc = frac[2] & (sum0[0] | frac[1] | frac[0]);
      RM_TOWARD_ZERO:  inc = 1'b0;
      RM_TOWARD_POS:   inc = ~sign & any;
      RM_TOWARD_NEG:   inc = sign & any;
    endcase
    inexact = any;
    // complement and multiplexer
    if (!sub) begin
      y    = inc ? sum1[N-1:0] : sum0[N-1:0];
      cout = inc ? sum1[N] : sum0[N];
    end else if (!any) begin
      y    = sum1[N] ? sum1[N-1:0] : ~sum0[N-1:0];
      cout = 1'b0;
    end else begin
      y    = inc ? sum1[N-1:0] : sum0[N-1:0];
      cout = 1'b0;
    end
  end
endmodule
