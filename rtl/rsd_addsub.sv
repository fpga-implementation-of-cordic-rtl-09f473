// rsd_addsub: two's-complement add/subtract unit built on redundant
// (signed-digit) arithmetic; this is the "+/-" box of every CORDIC stage.
//
// The first operand a is read as a signed-digit number without any logic:
// its low W-1 bits are positive digits and its sign bit is a negative digit
// of weight 2^(W-1). The second operand b is fed as an unsigned number to the
// hybrid adder (sub = 0) or the hybrid subtractor (sub = 1), which produce the
// W+1-digit redundant result carry-free. Reading b as unsigned differs from its
// two's-complement value by b[W-1]*2^W, which vanishes modulo 2^W, so the low
// W digits, converted back with one W-bit subtraction s_p - s_n, give a + b or
// a - b modulo 2^W. Using the hybrid adder and subtractor follows the published
// design; how operands enter them and how the redundant result is converted
// back is this design's own choice. Combinational. The top digit (W) of the
// redundant result is not used: it only carries weight 2^W, which the
// modulo-2^W result drops, so a lint tool reports it as unused.
module rsd_addsub #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,  // 1: a - b, 0: a + b
  output logic signed [W-1:0] y     // result modulo 2^W
);
  logic [W-1:0] a_p, a_n;
  logic [W:0]   add_p, add_n, sub_p, sub_n;
  logic [W:0]   sel_p, sel_n;

  assign a_p = {1'b0, a[W-2:0]};
  assign a_n = {a[W-1], {(W-1){1'b0}}};

  rsd_hybrid_adder      #(.W(W)) u_add (.x_p(a_p), .x_n(a_n), .y(b), .s_p(add_p), .s_n(add_n));
  rsd_hybrid_subtractor #(.W(W)) u_sub (.x_p(a_p), .x_n(a_n), .y(b), .s_p(sub_p), .s_n(sub_n));

  always_comb begin
    sel_p = sub ? sub_p : add_p;
    sel_n = sub ? sub_n : add_n;
    // Redundant-to-two's-complement conversion; digit W drops out modulo 2^W.
    y     = signed'(sel_p[W-1:0] - sel_n[W-1:0]);
  end
endmodule
