// cordic_sincos: sine and cosine of a whole-degree angle, 0..359, as integers
// scaled to -100..100, from a six-stage multiplexer-based pipelined CORDIC
// with redundant-arithmetic adders.
//
// quadrant_fold brings the angle into 0..90 degrees, cordic_mux_core rotates
// the fixed vector (61, 0) by it, and quadrant_unfold restores the signs. The
// quadrant travels beside the core in a delay line as long as the core's
// latency, so a new angle can enter every clock.
//
// Interface: in_valid/angle in, out_valid/sin_o/cos_o/z_o out, no back
// pressure. z_o is the residual angle the core leaves (within a few degrees
// of zero). Latency: 3 clocks with PIPELINED = 1 (default), 1 clock with
// PIPELINED = 0. Synchronous active-high reset clears the valid pipeline.
// The core follows the published design; the full-circle wrapper, the valid
// signal and the reset are this design's.
module cordic_sincos
  import cordic_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [8:0]                angle,     // 0..359 degrees
  output logic                      out_valid,
  output logic signed [DATA_W-1:0]  sin_o,
  output logic signed [DATA_W-1:0]  cos_o,
  output logic signed [ANGLE_W-1:0] z_o
);
  localparam int unsigned LATENCY = PIPELINED ? 3 : 1;

  logic signed [ANGLE_W-1:0] theta;
  quadrant_e                 quad_in;
  quadrant_e                 quad_dly [LATENCY];
  logic signed [DATA_W-1:0]  cos_q1, sin_q1;

  quadrant_fold #(.AW(ANGLE_W)) u_fold (.angle(angle), .theta(theta), .quad(quad_in));

  cordic_mux_core #(.PIPELINED(PIPELINED)) u_core (
    .clk(clk), .rst(rst), .in_valid(in_valid), .theta(theta),
    .out_valid(out_valid), .cos_o(cos_q1), .sin_o(sin_q1), .z_o(z_o)
  );

  always_ff @(posedge clk) begin
    quad_dly[0] <= quad_in;
    for (int i = 1; i < LATENCY; i++) quad_dly[i] <= quad_dly[i-1];
  end

  quadrant_unfold #(.DW(DATA_W)) u_unfold (
    .quad(quad_dly[LATENCY-1]), .cos_i(cos_q1), .sin_i(sin_q1), .cos_o(cos_o), .sin_o(sin_o)
  );

  always_ff @(posedge clk) begin
    if (!rst && in_valid)
      assert (angle < 9'd360) else $error("cordic_sincos: angle %0d not below 360", angle);
  end
endmodule
