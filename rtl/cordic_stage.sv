// cordic_stage: one rotation-mode CORDIC micro-rotation by +-atan(2^-SHIFT).
//
//     x_next = x - d * (y >>> SHIFT)
//     y_next = y + d * (x >>> SHIFT)
//     z_next = z - d * ANGLE,        d = +1 if z >= 0 else -1
// The shifts are arithmetic right shifts (rounding toward minus infinity) and
// are pure wiring; the three add/subtract units are the redundant-arithmetic
// units. The equations follow the published design; shift rounding and port
// names are this design's choice. Combinational; no scaling by the CORDIC
// gain is done here (it is folded into the starting value of x).
module cordic_stage #(
  parameter int unsigned DW    = 8,   // width of x and y
  parameter int unsigned AW    = 8,   // width of z
  parameter int unsigned SHIFT = 3,   // stage index i: shift by i
  parameter int          ANGLE = 7    // round(atan(2^-i)) in degrees
) (
  input  logic signed [DW-1:0] x,
  input  logic signed [DW-1:0] y,
  input  logic signed [AW-1:0] z,
  output logic signed [DW-1:0] x_next,
  output logic signed [DW-1:0] y_next,
  output logic signed [AW-1:0] z_next
);
  logic                neg;
  logic signed [DW-1:0] x_sh, y_sh;

  assign x_sh = x >>> SHIFT;
  assign y_sh = y >>> SHIFT;

  angle_stage #(.W(AW), .ANGLE(ANGLE)) u_z (.z(z), .z_next(z_next), .neg(neg));

  // forward (neg = 0): x - y_sh, y + x_sh; backward: x + y_sh, y - x_sh
  rsd_addsub #(.W(DW)) u_x (.a(x), .b(y_sh), .sub(~neg), .y(x_next));
  rsd_addsub #(.W(DW)) u_y (.a(y), .b(x_sh), .sub(neg),  .y(y_next));
endmodule
