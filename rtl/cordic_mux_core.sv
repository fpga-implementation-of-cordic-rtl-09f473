// cordic_mux_core: six-stage rotation-mode CORDIC for sine and cosine of an
// angle of 0..90 degrees, with its first three x/y stages replaced by
// multiplexers.
//
// The angle column runs all six stages (subtract or add 45, 27, 14, 7, 4, 2
// degrees by the sign of the residual angle). The signs of z1 and z2 steer
// mux_rotator, which delivers x3/y3; stages 4 to 6 are ordinary
// micro-rotations with shifts of 3, 4 and 5. Every add/subtract is a
// redundant-arithmetic unit. The result is x6 = cos, y6 = sin (scaled to
// 100) and z6, the residual angle.
//
// Timing: with PIPELINED = 1 (default) a pipeline register follows stage 4
// and stage 5, as published; the output register is this design's addition,
// so the latency is 3 clocks. With PIPELINED = 0 only the output register
// remains and the latency is 1 clock. One angle is accepted every clock; there
// is no stall. in_valid travels alongside the data to out_valid (a choice of
// this design, as is the synchronous active-high reset, which clears only the
// valid bits).
module cordic_mux_core
  import cordic_pkg::*;
#(
  parameter bit          PIPELINED = 1'b1,
  parameter int unsigned DW        = DATA_W,
  parameter int unsigned AW        = ANGLE_W,
  parameter int          X0        = X_INIT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] theta,     // 0..90 degrees
  output logic                 out_valid,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o,
  output logic signed [AW-1:0] z_o        // residual angle after stage 6
);
  // ---- stages 1-3: angle column and multiplexer tree --------------------
  logic signed [AW-1:0] z1, z2, z3;
  logic                 neg0, neg1, neg2;

  angle_stage #(.W(AW), .ANGLE(ATAN_DEG[0])) u_z1 (.z(theta), .z_next(z1), .neg(neg0));
  angle_stage #(.W(AW), .ANGLE(ATAN_DEG[1])) u_z2 (.z(z1),    .z_next(z2), .neg(neg1));
  angle_stage #(.W(AW), .ANGLE(ATAN_DEG[2])) u_z3 (.z(z2),    .z_next(z3), .neg(neg2));

  logic signed [DW-1:0] x3, y3;
  mux_rotator #(.DW(DW), .X0(X0)) u_mux (.sgn1(neg1), .sgn2(neg2), .x3(x3), .y3(y3));

  // ---- stage 4 ----------------------------------------------------------
  logic signed [DW-1:0] x4, y4;
  logic signed [AW-1:0] z4;
  cordic_stage #(.DW(DW), .AW(AW), .SHIFT(3), .ANGLE(ATAN_DEG[3])) u_s4
    (.x(x3), .y(y3), .z(z3), .x_next(x4), .y_next(y4), .z_next(z4));

  // ---- optional pipeline register after stage 4 -------------------------
  logic signed [DW-1:0] x4q, y4q;
  logic signed [AW-1:0] z4q;
  logic                 v4q;

  // ---- stage 5 ----------------------------------------------------------
  logic signed [DW-1:0] x5, y5;
  logic signed [AW-1:0] z5;
  cordic_stage #(.DW(DW), .AW(AW), .SHIFT(4), .ANGLE(ATAN_DEG[4])) u_s5
    (.x(x4q), .y(y4q), .z(z4q), .x_next(x5), .y_next(y5), .z_next(z5));

  // ---- optional pipeline register after stage 5 -------------------------
  logic signed [DW-1:0] x5q, y5q;
  logic signed [AW-1:0] z5q;
  logic                 v5q;

  // ---- stage 6 ----------------------------------------------------------
  logic signed [DW-1:0] x6, y6;
  logic signed [AW-1:0] z6;
  cordic_stage #(.DW(DW), .AW(AW), .SHIFT(5), .ANGLE(ATAN_DEG[5])) u_s6
    (.x(x5q), .y(y5q), .z(z5q), .x_next(x6), .y_next(y6), .z_next(z6));

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk) begin
      x4q <= x4;  y4q <= y4;  z4q <= z4;
      x5q <= x5;  y5q <= y5;  z5q <= z5;
      if (rst) begin
        v4q <= 1'b0;
        v5q <= 1'b0;
      end else begin
        v4q <= in_valid;
        v5q <= v4q;
      end
    end
  end else begin : g_flat
    always_comb begin
      x4q = x4;  y4q = y4;  z4q = z4;  v4q = in_valid;
      x5q = x5;  y5q = y5;  z5q = z5;  v5q = v4q;
    end
  end

  // ---- output register --------------------------------------------------
  always_ff @(posedge clk) begin
    cos_o <= x6;
    sin_o <= y6;
    z_o   <= z6;
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v5q;
  end

  // The multiplexer tree assumes stage 1 always rotates forward.
  always_ff @(posedge clk) begin
    if (!rst && in_valid)
      assert (!neg0 && theta <= 90)
        else $error("cordic_mux_core: angle %0d outside 0..90", theta);
  end

endmodule
