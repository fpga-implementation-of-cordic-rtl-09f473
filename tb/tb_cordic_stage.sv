// tb_cordic_stage: random vectors and angles through the three micro-rotation
// stages used after the multiplexer tree (shifts 3, 4, 5), each compared with
// the micro-rotation equations computed in integers.
module tb_cordic_stage;
  localparam int SH [3] = '{3, 4, 5};
  localparam int AN [3] = '{7, 4, 2};
  logic signed [7:0] x, y, z;
  logic signed [7:0] xn [3];
  logic signed [7:0] yn [3];
  logic signed [7:0] zn [3];
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  for (genvar k = 0; k < 3; k++) begin : g_dut
    cordic_stage #(.DW(8), .AW(8), .SHIFT(SH[k]), .ANGLE(AN[k])) dut
      (.x(x), .y(y), .z(z), .x_next(xn[k]), .y_next(yn[k]), .z_next(zn[k]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi, yi, zi, ex, ey, ez;
    for (int n = 0; n < 10000; n++) begin
      xi = int'($urandom_range(200)) - 100;
      yi = int'($urandom_range(200)) - 100;
      zi = int'($urandom_range(120)) - 60;
      x = 8'(xi);  y = 8'(yi);  z = 8'(zi);
      @(posedge clk);
      for (int k = 0; k < 3; k++) begin
        if (zi >= 0) begin
          ex = xi - (yi >>> SH[k]);  ey = yi + (xi >>> SH[k]);  ez = zi - AN[k];
        end else begin
          ex = xi + (yi >>> SH[k]);  ey = yi - (xi >>> SH[k]);  ez = zi + AN[k];
        end
        checks++;
        if (int'(xn[k]) != ex || int'(yn[k]) != ey || int'(zn[k]) != ez) begin
          failures++;
          if (failures < 10)
            $display("FAIL shift %0d (%0d,%0d,%0d): got (%0d,%0d,%0d) want (%0d,%0d,%0d)",
                     SH[k], xi, yi, zi, xn[k], yn[k], zn[k], ex, ey, ez);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
