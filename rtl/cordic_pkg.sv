// cordic_pkg: constants shared by the six-stage, multiplexer-based CORDIC.
//
// Angles are whole degrees in two's complement; sine and cosine are integers
// scaled so that 1.0 reads as 100. The word width of 8 bits and the starting
// x value of 61 (100 times the inverse CORDIC gain 0.607, rounded down) follow
// the published design, as do the rounded arctangent constants
// 45, 27, 14, 7, 4, 2 = round(atan(2^-i) in degrees) for i = 0..5.
// The quadrant encoding is this design's own.
package cordic_pkg;

  localparam int unsigned DATA_W   = 8;   // width of x, y, sine and cosine
  localparam int unsigned ANGLE_W  = 8;   // width of the angle accumulator z
  localparam int unsigned NSTAGES  = 6;   // micro-rotations
  localparam int          X_INIT   = 61;  // x0 = 100 * 0.6073, y0 = 0

  // round(atan(2^-i) * 180/pi), i = 0..5
  localparam int ATAN_DEG [NSTAGES] = '{45, 27, 14, 7, 4, 2};

  // Quadrant of a full-circle angle: Q0 = [0,90], Q1 = (90,180],
  // Q2 = (180,270], Q3 = (270,360)
  typedef enum logic [1:0] {Q0 = 2'd0, Q1 = 2'd1, Q2 = 2'd2, Q3 = 2'd3} quadrant_e;

endpackage
