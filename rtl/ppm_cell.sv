// ppm_cell: plus-plus-minus full adder, the digit cell of the hybrid radix-2
// signed-digit adder.
//
// One redundant digit x = x_p - x_n in {-1,0,1} is added to one ordinary bit
// y in {0,1}. The sum p = x + y in {-1,0,1,2} is split into a transfer digit
// of weight two and an interim sum of negative weight:
//     x_p - x_n + y = 2*t_p - u_n
// This is an ordinary full adder with its minus input and its sum output
// inverted: t_p = majority(x_p, ~x_n, y), u_n = x_p ^ x_n ^ y.
// The cell, its ports and the equation follow the published design (the
// interim sum is taken with negative weight, as its digit-set table gives);
// the gate-level form is this design's. Purely combinational.
module ppm_cell (
  input  logic x_p,  // positive bit of the signed digit
  input  logic x_n,  // negative bit of the signed digit
  input  logic y,    // unsigned operand bit (positive weight)
  output logic t_p,  // transfer digit, weight 2, positive
  output logic u_n   // interim sum digit, weight 1, negative
);
  always_comb begin
    t_p = (x_p & ~x_n) | (x_p & y) | (~x_n & y);
    u_n = x_p ^ x_n ^ y;
  end
endmodule
