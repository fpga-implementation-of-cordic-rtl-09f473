// tb_mmp_cell: exhaustive check of the MMP cell against
// x_p - x_n - y = b - 2*t.
module tb_mmp_cell;
  logic x_p, x_n, y, t, b;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  mmp_cell dut (.x_p(x_p), .x_n(x_n), .y(y), .t(t), .b(b));

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
      if (int'(b) - 2 * int'(t) != int'(x_p) - int'(x_n) - int'(y)) begin
        failures++;
        $display("FAIL x_p=%b x_n=%b y=%b -> t=%b b=%b", x_p, x_n, y, t, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
