// mux_rotator: the first three micro-rotations of x and y, done with six 2:1
// multiplexers instead of adders and shifters.
//
// With x0 fixed (X0) and y0 = 0, stage 1 always rotates forward (the input
// angle is 0..90 degrees), so x1 = y1 = X0. After stages 2 and 3 only four
// magnitudes can occur, which are precomputed:
//     P = X0/8, Q = 11*X0/8, R = 7*X0/8, S = 13*X0/8   (rounded down;
//     7, 83, 53, 99 for X0 = 61)
// and the signs of z1 and z2 pick among them:
//     z1 >= 0, z2 >= 0 : x3 = P, y3 = S      z1 < 0, z2 >= 0 : x3 = Q, y3 = R
//     z1 >= 0, z2 <  0 : x3 = R, y3 = Q      z1 < 0, z2 <  0 : x3 = S, y3 = P
// Four multiplexers steered by sgn2 feed two steered by sgn1. The idea, the
// count of six multiplexers in two levels and the constants follow the
// published design; the table is derived here from the micro-rotation
// equations (x carries the cosine, y the sine). Combinational.
module mux_rotator #(
  parameter int unsigned DW = 8,
  parameter int          X0 = 61   // starting x: 100 times the inverse CORDIC gain
) (
  input  logic                 sgn1,  // 1 when z1 < 0
  input  logic                 sgn2,  // 1 when z2 < 0
  output logic signed [DW-1:0] x3,
  output logic signed [DW-1:0] y3
);
  localparam logic signed [DW-1:0] P = DW'((X0 * 1)  / 8);
  localparam logic signed [DW-1:0] Q = DW'((X0 * 11) / 8);
  localparam logic signed [DW-1:0] R = DW'((X0 * 7)  / 8);
  localparam logic signed [DW-1:0] S = DW'((X0 * 13) / 8);

  logic signed [DW-1:0] x_fwd, x_bck, y_fwd, y_bck;  // first level, by sgn2

  always_comb begin
    x_fwd = sgn2 ? R : P;   // z1 >= 0
    x_bck = sgn2 ? S : Q;   // z1 <  0
    y_fwd = sgn2 ? Q : S;
    y_bck = sgn2 ? P : R;
    x3    = sgn1 ? x_bck : x_fwd;
    y3    = sgn1 ? y_bck : y_fwd;
  end
endmodule
