// mmp_cell: minus-minus-plus cell, the digit cell of the hybrid radix-2
// signed-digit subtractor.
//
// One ordinary bit y is subtracted from one redundant digit x = x_p - x_n:
//     x_p - x_n - y = b - 2*t
// with b in {0,1} an interim sum of positive weight one and t in {0,1} a
// transfer (borrow) digit of negative weight two, so no borrow ripples.
// b is the parity of the three inputs; t is set when x_n + y exceeds x_p.
// The cell, its ports and the relation x_p - x_n - y = b - 2t follow the
// published design; the gate equations are derived here from that relation.
// Purely combinational.
module mmp_cell (
  input  logic x_p,  // positive bit of the signed digit
  input  logic x_n,  // negative bit of the signed digit
  input  logic y,    // unsigned subtrahend bit
  output logic t,    // transfer digit, weight 2, negative
  output logic b     // interim sum digit, weight 1, positive
);
  always_comb begin
    b = x_p ^ x_n ^ y;
    t = (~x_p & x_n) | (~x_p & y) | (x_n & y);
  end
endmodule
