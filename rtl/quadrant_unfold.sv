// quadrant_unfold: restores the signs of sine and cosine for the quadrant
// that quadrant_fold removed.
//     Q0: ( cos,  sin)   Q1: (-cos,  sin)   Q2: (-cos, -sin)   Q3: ( cos, -sin)
// Using quadrant symmetry follows the published design; this realisation is
// this design's. Combinational.
module quadrant_unfold
  import cordic_pkg::*;
#(
  parameter int unsigned DW = DATA_W
) (
  input  quadrant_e            quad,
  input  logic signed [DW-1:0] cos_i,  // first-quadrant cosine
  input  logic signed [DW-1:0] sin_i,  // first-quadrant sine
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o
);
  always_comb begin
    cos_o = (quad == Q1 || quad == Q2) ? -cos_i : cos_i;
    sin_o = (quad == Q2 || quad == Q3) ? -sin_i : sin_i;
  end
endmodule
