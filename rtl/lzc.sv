// lzc: leading zero counter.
//
// Counts the zeros above the most significant one of x; a zero word gives W.
// Written as a priority search from the LSB upward so that the last (highest)
// one found sets the count. Combinational. Used by the close (LZA) path of
// the triple path adder to find the normalization shift.
module lzc #(
  parameter int unsigned W  = 25,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] cnt
);
  always_comb begin
    cnt = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (x[i]) cnt = CW'(W - 1 - i);
    end
  end
endmodule
