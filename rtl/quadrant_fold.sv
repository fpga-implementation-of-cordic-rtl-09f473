// quadrant_fold: reduces a full-circle angle to the first quadrant.
//
// The CORDIC core works on 0..90 degrees; the other three quadrants follow
// from the symmetries of sine and cosine. This block maps an angle of 0..359
// degrees to theta in 0..90 and reports the quadrant:
//     Q0 [0,90]    theta = a          Q1 (90,180]  theta = 180 - a
//     Q2 (180,270] theta = a - 180    Q3 (270,360) theta = 360 - a
// Using quadrant symmetry follows the published design; the mapping, the
// 9-bit angle input and the encoding are this design's. Combinational.
// The reduced angle never exceeds 90, so its ninth bit is unused.
module quadrant_fold
  import cordic_pkg::*;
#(
  parameter int unsigned AW = ANGLE_W
) (
  input  logic [8:0]           angle,  // 0..359 degrees
  output logic signed [AW-1:0] theta,  // 0..90 degrees
  output quadrant_e            quad
);
  logic [8:0] red;

  always_comb begin
    if (angle <= 9'd90) begin
      quad = Q0;  red = angle;
    end else if (angle <= 9'd180) begin
      quad = Q1;  red = 9'd180 - angle;
    end else if (angle <= 9'd270) begin
      quad = Q2;  red = angle - 9'd180;
    end else begin
      quad = Q3;  red = 9'd360 - angle;
    end
    theta = signed'(AW'(red));
  end
endmodule
