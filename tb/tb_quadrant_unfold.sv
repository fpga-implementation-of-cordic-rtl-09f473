// tb_quadrant_unfold: every quadrant with random first-quadrant values;
// checks the sign pattern of each quadrant.
module tb_quadrant_unfold;
  import cordic_pkg::*;
  quadrant_e         quad;
  logic signed [7:0] ci, si, co, so;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  quadrant_unfold #(.DW(8)) dut (.quad(quad), .cos_i(ci), .sin_i(si), .cos_o(co), .sin_o(so));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, s, ec, es;
    for (int n = 0; n < 400; n++) begin
      c = int'($urandom_range(100));  s = int'($urandom_range(100));
      quad = quadrant_e'(n % 4);
      ci = 8'(c);  si = 8'(s);
      @(posedge clk);
      ec = (n % 4 == 1 || n % 4 == 2) ? -c : c;
      es = (n % 4 >= 2) ? -s : s;
      checks++;
      if (int'(co) != ec || int'(so) != es) begin
        failures++;  $display("FAIL q%0d (%0d,%0d) -> (%0d,%0d)", n % 4, c, s, co, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
