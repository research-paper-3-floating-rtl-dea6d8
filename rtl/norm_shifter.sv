// norm_shifter: normalization (left) shifter for floating-point arithmetic.
//
// SW rows of 2:1 multiplexers. Row j, driven by sel[j], moves the word 2^j
// places toward the MSB; zeros enter at the LSB end. With W = 8 and SW = 3 the
// rows are SEL0 (1 place), SEL1 (2) and SEL2 (4). The close path of the adder
// uses it at p+1 bits with the leading-zero count as the select.
// Combinational.
module norm_shifter #(
  parameter int unsigned W  = 8,
  parameter int unsigned SW = 3
) (
  input  logic [W-1:0]  a,
  input  logic [SW-1:0] sel,
  output logic [W-1:0]  y
);
  logic [W-1:0] row [SW+1];

  always_comb begin
    row[0] = a;
    for (int j = 0; j < SW; j++) begin
      row[j+1] = sel[j] ? (row[j] << (1 << j)) : row[j];
    end
  end

  assign y = row[SW];
endmodule
