// tb_ppm_cell: exhaustive check of the PPM cell against
// x_p - x_n + y = 2*t_p - u_n.
module tb_ppm_cell;
  logic x_p, x_n, y, t_p, u_n;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  ppm_cell dut (.x_p(x_p), .x_n(x_n), .y(y), .t_p(t_p), .u_n(u_n));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x_p, x_n, y} = 3'(v);
      @(posedge clk);
      checks++;
      if (2 * int'(t_p) - int'(u_n) != int'(x_p) - int'(x_n) + int'(y)) begin
        failures++;
        $display("FAIL x_p=%b x_n=%b y=%b -> t_p=%b u_n=%b", x_p, x_n, y, t_p, u_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
