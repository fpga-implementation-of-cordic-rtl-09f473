// rsd_hybrid_subtractor: W-digit hybrid radix-2 subtractor, S = X - Y.
//
// X is a signed-digit number (digit i = x_p[i] - x_n[i]), Y an unsigned
// binary number. One MMP cell per digit gives b[i] - 2*t[i]; the result digit
// is s[i] = b[i] - t[i-1] with t[-1] = 0 and a top digit s[W] = -t[W-1].
// No borrow ripples. The MMP cell follows the published design; the word-level
// arrangement mirrors its four-digit adder and is this design's. Combinational.
module rsd_hybrid_subtractor #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x_p,  // positive bits of X
  input  logic [W-1:0] x_n,  // negative bits of X
  input  logic [W-1:0] y,    // unsigned Y
  output logic [W:0]   s_p,  // positive bits of S (W+1 digits)
  output logic [W:0]   s_n   // negative bits of S
);
  logic [W-1:0] t;
  logic [W-1:0] b;

  for (genvar i = 0; i < W; i++) begin : g_digit
    mmp_cell u_mmp (.x_p(x_p[i]), .x_n(x_n[i]), .y(y[i]), .t(t[i]), .b(b[i]));
  end

  assign s_p = {1'b0, b};     // interim sums stay in place
  assign s_n = {t, 1'b0};     // borrows move up one position
endmodule
