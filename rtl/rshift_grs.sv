// rshift_grs: alignment right shifter with guard, round and sticky generation.
//
// The significand a is shifted right by sh places through SW rows of 2:1
// multiplexers (row j moves 2^j places). The W bits that stay form c; the
// first two bits shifted out are the guard bit g and the round bit r; every
// bit shifted out beyond them is ORed into the sticky bit s. A shift of W+2
// or more leaves only the sticky bit set. W = 8 and a 5-bit shift amount are
// the sizes of the worked example; the far path of the adder uses W = p.
// Combinational.
module rshift_grs #(
  parameter int unsigned W  = 8,
  parameter int unsigned SW = 5
) (
  input  logic [W-1:0]  a,
  input  logic [SW-1:0] sh,
  output logic [W-1:0]  c,
  output logic          g,
  output logic          r,
  output logic          s
);
  // a sits at the top of a window wide enough to hold every shifted-out bit
  localparam int unsigned L = W + (1 << SW);

  logic [L-1:0] row [SW+1];

  always_comb begin
    row[0] = {a, {(1 << SW){1'b0}}};
    for (int j = 0; j < SW; j++) begin
      row[j+1] = sh[j] ? (row[j] >> (1 << j)) : row[j];
    end
  end

  assign c = row[SW][L-1 -: W];
  assign g = row[SW][L-1-W];
  assign r = row[SW][L-2-W];
  assign s = |row[SW][L-3-W:0];
endmodule
