// dist_barrel_shifter: distributed (logarithmic) barrel shifter, right shift.
//
// Three rows of 2:1 multiplexers. Row S0 forms k_i = S0 ? x_(i+1) : x_i,
// row S1 forms w_i = S1 ? k_(i+2) : k_i, row S2 forms y_i = S2 ? w_(i+4) : w_i,
// so y = x shifted right by {S2,S1,S0}. The mux inputs that lie above bit W-1
// (x8, k8, k9, w8..w11 for W = 8) take the value of the fill input: zero for
// a logical shift, the sign for an arithmetic one. Combinational.
module dist_barrel_shifter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic         fill,
  input  logic [2:0]   s,
  output logic [W-1:0] y
);
  logic [W+3:0] xe, ke, we;

  always_comb begin
    xe = {{4{fill}}, x};
    ke = xe;
    we = xe;
    for (int i = 0; i < W; i++) ke[i] = s[0] ? xe[i+1] : xe[i];
    for (int i = 0; i < W; i++) we[i] = s[1] ? ke[i+2] : ke[i];
    for (int i = 0; i < W; i++) y[i]  = s[2] ? we[i+4] : we[i];
  end
endmodule
