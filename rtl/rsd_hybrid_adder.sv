// rsd_hybrid_adder: W-digit hybrid radix-2 adder, S = X + Y.
//
// X is a signed-digit number (digit i = x_p[i] - x_n[i], weight 2^i), Y an
// unsigned binary number. One PPM cell per digit forms 2*t_p[i] - u_n[i];
// the sum digit is s[i] = t_p[i-1] - u_n[i], with t_p[-1] = 0 and an extra
// top digit s[W] = t_p[W-1]. No signal crosses more than one digit position,
// so the delay does not grow with W. Structure as published (four-digit
// example, Figure 4 of the source); W is a parameter here. Combinational.
module rsd_hybrid_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x_p,  // positive bits of X
  input  logic [W-1:0] x_n,  // negative bits of X
  input  logic [W-1:0] y,    // unsigned Y
  output logic [W:0]   s_p,  // positive bits of S (W+1 digits)
  output logic [W:0]   s_n   // negative bits of S
);
  logic [W-1:0] t_p;
  logic [W-1:0] u_n;

  for (genvar i = 0; i < W; i++) begin : g_digit
    ppm_cell u_ppm (.x_p(x_p[i]), .x_n(x_n[i]), .y(y[i]), .t_p(t_p[i]), .u_n(u_n[i]));
  end

  assign s_p = {t_p, 1'b0};   // transfer digits move up one position
  assign s_n = {1'b0, u_n};   // top interim sum digit is zero
endmodule
