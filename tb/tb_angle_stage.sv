// tb_angle_stage: every 8-bit residual angle through a 45-degree and a
// 2-degree angle stage; checks the direction bit and the next angle.
module tb_angle_stage;
  logic signed [7:0] z, zn45, zn2;
  logic              neg45, neg2;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  angle_stage #(.W(8), .ANGLE(45)) dut45 (.z(z), .z_next(zn45), .neg(neg45));
  angle_stage #(.W(8), .ANGLE(2))  dut2  (.z(z), .z_next(zn2),  .neg(neg2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int zi = -128; zi < 128; zi++) begin
      z = 8'(zi);
      @(posedge clk);
      checks += 3;
      if (neg45 != (zi < 0) || neg2 != (zi < 0)) failures++;
      if (zn45 != 8'((zi >= 0) ? zi - 45 : zi + 45)) begin
        failures++;  $display("FAIL z=%0d 45: got %0d", zi, zn45);
      end
      if (zn2 != 8'((zi >= 0) ? zi - 2 : zi + 2)) begin
        failures++;  $display("FAIL z=%0d 2: got %0d", zi, zn2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
