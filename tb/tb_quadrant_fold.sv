// tb_quadrant_fold: every angle 0..359; the folded angle must lie in 0..90
// and give the same |sin| and |cos| as the original angle, with the quadrant
// matching the signs of the true sine and cosine.
module tb_quadrant_fold;
  import cordic_pkg::*;
  logic [8:0]        angle;
  logic signed [7:0] theta;
  quadrant_e         quad;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;
  localparam real PI = 3.14159265358979;

  quadrant_fold #(.AW(8)) dut (.angle(angle), .theta(theta), .quad(quad));

  always #5 clk = ~clk;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, t;
    int  ti;
    for (int ai = 0; ai < 360; ai++) begin
      angle = 9'(ai);
      @(posedge clk);
      a = ai * PI / 180.0;
      ti = theta;
      t = ti * PI / 180.0;
      checks++;
      if (theta < 0 || theta > 90 ||
          rabs(rabs($sin(a)) - $sin(t)) > 1e-9 || rabs(rabs($cos(a)) - $cos(t)) > 1e-9) begin
        failures++;  $display("FAIL angle %0d -> theta %0d", ai, theta);
      end
      checks++;
      // Q0: cos >= 0, sin >= 0; Q1: cos < 0; Q2: both < 0; Q3: sin < 0
      if (ai <= 90 && quad != Q0 || ai > 90 && ai <= 180 && quad != Q1 ||
          ai > 180 && ai <= 270 && quad != Q2 || ai > 270 && quad != Q3) begin
        failures++;  $display("FAIL angle %0d -> quadrant %0d", ai, quad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
