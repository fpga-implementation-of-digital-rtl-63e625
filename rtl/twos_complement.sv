// twos_complement: conditional two's complement of a W-bit word.
//
// y = neg ? -x : x, computed as the bitwise inverse plus one, combinationally.
// The sign-magnitude adder uses it three times: to turn each negative operand
// magnitude into a two's complement number before the addition, and to turn
// a negative sum back into a magnitude afterwards. A separate two's
// complement module is part of the source design; its inverse-plus-one form
// is this design's choice.
module twos_complement #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] x,
  input  logic         neg,
  output logic [W-1:0] y
);

  assign y = neg ? (~x + W'(1)) : x;

endmodule
