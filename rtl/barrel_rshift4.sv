// barrel_rshift4: 4-bit right shift barrel shifter.
//
// Four 4:1 multiplexers share the select S1 S0. Output bit i takes x[i+s];
// select codes that reach above x3 feed zeros, so the word moves right by
// 0 to 3 places with zero fill. Combinational.
module barrel_rshift4 (
  input  logic [3:0] x,
  input  logic [1:0] s,
  output logic [3:0] y
);
  logic [6:0] ext;
  assign ext = {3'b000, x};

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      // one 4:1 mux per output bit, inputs 00, 01, 10, 11
      unique case (s)
        2'd0: y[i] = ext[i];
        2'd1: y[i] = ext[i+1];
        2'd2: y[i] = ext[i+2];
        2'd3: y[i] = ext[i+3];
      endcase
    end
  end
endmodule
