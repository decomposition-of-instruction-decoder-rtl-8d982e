// output_or: the output OR gates behind a pair of sub-decoders.
//
// Only one of the two sub-decoders is on; the other sees its don't-care
// minterm and outputs all zeros, so a bitwise OR of the two outputs gives the
// output of the one that is on. Purely combinational.
module output_or #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = a | b;
endmodule
