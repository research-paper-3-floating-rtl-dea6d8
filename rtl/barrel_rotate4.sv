// barrel_rotate4: 4-bit shift-and-rotate barrel shifter.
//
// Four 4:1 multiplexers share S1 S0. Select 0 passes D3..D0, select n rotates
// the word n places so that Y3..Y0 = D(3-n)..: for n = 1 the outputs are
// D2 D1 D0 D3, for n = 2 D1 D0 D3 D2, for n = 3 D0 D3 D2 D1. Combinational.
module barrel_rotate4 (
  input  logic [3:0] d,
  input  logic [1:0] s,
  output logic [3:0] y
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      // mux i, input n carries D[(i - n) mod 4]
      unique case (s)
        2'd0: y[i] = d[i];
        2'd1: y[i] = d[(i + 3) % 4];
        2'd2: y[i] = d[(i + 2) % 4];
        2'd3: y[i] = d[(i + 1) % 4];
      endcase
    end
  end
endmodule
