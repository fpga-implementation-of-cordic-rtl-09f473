// angle_stage: one step of the angle accumulator of a rotation-mode CORDIC.
//
// If the residual angle z is zero or positive the vector is rotated forward
// and the stage's arctangent constant is subtracted; if z is negative it is
// rotated back and the constant is added:
//     z_next = z - d*ANGLE,  d = +1 if z >= 0 else -1.
// The direction bit is brought out for the x/y datapath (and, in stages 1-3,
// as the select of the multiplexer tree). The add/subtract uses the redundant
// arithmetic unit. Rule and constants follow the published design; port names
// are this design's. Combinational.
module angle_stage #(
  parameter int unsigned W     = 8,
  parameter int          ANGLE = 45   // arctangent of this stage, degrees
) (
  input  logic signed [W-1:0] z,
  output logic signed [W-1:0] z_next,
  output logic                neg     // 1 when z < 0 (rotate back)
);
  localparam logic signed [W-1:0] ANGLE_C = W'(ANGLE);

  assign neg = z[W-1];

  rsd_addsub #(.W(W)) u_as (.a(z), .b(ANGLE_C), .sub(~neg), .y(z_next));
endmodule
