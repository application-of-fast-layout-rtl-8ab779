// quotient_converter: redundant-to-binary quotient conversion.
//
// Every divider produces its quotient as signed digits. The digits are
// split into a vector of positive parts and a vector of negative parts
// (each a plain binary number), and the converter subtracts them,
// Q = pos - neg, with one carry-propagate subtractor. The result is two's
// complement of the same width. The converter's position at the end of
// each array is that of the source layouts; the single subtractor is this
// design's own minimal choice. Purely combinational.
module quotient_converter #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] pos,
  input  logic [W-1:0] neg,
  output logic [W-1:0] q
);
  always_comb q = pos - neg;
endmodule
