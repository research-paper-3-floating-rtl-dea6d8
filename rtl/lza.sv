// lza: leading-zero anticipator for an effective subtraction A - B, A > B.
//
// It works on the adder's own inputs, A and the bit-inverted B' = ~B, in
// parallel with the adder, and predicts how far the difference must be
// shifted left. With T = A XOR B' and Z = ~A AND ~B' (a borrow pattern), the
// indicator string is
//     f[i] = ~T[i] & ~Z[i-1]          (Z[-1] = 0)
// Its leading one marks the position where the run that starts at the first
// bit in which A and B differ ends. The difference's leading one is there
// or one place lower, depending on a borrow from the bits below. The count
// is therefore exact or one too small, and a one-bit compensation shift
// after the normalizing shift finishes the job. A = B gives f = 0 and a
// count of W. The count of f is taken by lzc. Combinational.
module lza #(
  parameter int unsigned W  = 56,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b_inv,
  output logic [CW-1:0] cnt
);
  logic [W-1:0] t, z, f;

  always_comb begin
    t = a ^ b_inv;
    z = ~a & ~b_inv;
    f = ~t & ~{z[W-2:0], 1'b0};
  end

  lzc #(.W(W), .CW(CW)) u_cnt (.x(f), .cnt(cnt));
endmodule
