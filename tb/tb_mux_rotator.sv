// tb_mux_rotator: all four sign combinations of z1 and z2. The expected x3/y3
// come from two exact micro-rotations of (61, 61) in real arithmetic, rounded
// down; the four constants must be 7, 83, 53 and 99.
module tb_mux_rotator;
  logic              sgn1, sgn2;
  logic signed [7:0] x3, y3;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  mux_rotator #(.DW(8), .X0(61)) dut (.sgn1(sgn1), .sgn2(sgn2), .x3(x3), .y3(y3));

  always #5 clk = ~clk;

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x1, y1, x2, y2, xr, yr, d;
    int  seen [int];
    x1 = 61.0;  y1 = 61.0;
    for (int v = 0; v < 4; v++) begin
      {sgn1, sgn2} = 2'(v);
      d  = sgn1 ? -1.0 : 1.0;
      x2 = x1 - d * y1 / 2.0;  y2 = y1 + d * x1 / 2.0;
      d  = sgn2 ? -1.0 : 1.0;
      xr = x2 - d * y2 / 4.0;  yr = y2 + d * x2 / 4.0;
      @(posedge clk);
      checks++;
      if (int'(x3) != $rtoi($floor(xr)) || int'(y3) != $rtoi($floor(yr))) begin
        failures++;
        $display("FAIL sgn1=%b sgn2=%b: got (%0d,%0d) want (%f,%f)", sgn1, sgn2, x3, y3, xr, yr);
      end
      seen[int'(x3)] = 1;
    end
    checks++;
    if (!(seen.exists(7) && seen.exists(83) && seen.exists(53) && seen.exists(99))) begin
      failures++;
      $display("FAIL constants 7, 83, 53, 99 not all produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
