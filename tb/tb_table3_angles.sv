// tb_table3_angles: the two angles of the published comparison (60 and 45
// degrees) through the full-circle unit in both of its configurations,
// multiplexer-based pipelined (latency 3) and multiplexer-based unpipelined
// (latency 1). Expected values are those of the integer reference model:
//     60 degrees: cos 50, sin 86, residual angle 1
//     45 degrees: cos 69, sin 72, residual angle 0
// and both configurations must give the same numbers.
module tb_table3_angles;
  import cordic_ref_pkg::*;

  logic              clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [8:0]        angle = '0;
  logic              ov [2];
  logic signed [7:0] so [2];
  logic signed [7:0] co [2];
  logic signed [7:0] zo [2];
  int   checks = 0, failures = 0;

  cordic_sincos #(.PIPELINED(1'b1)) dut_p (.clk(clk), .rst(rst), .in_valid(in_valid), .angle(angle),
    .out_valid(ov[0]), .sin_o(so[0]), .cos_o(co[0]), .z_o(zo[0]));
  cordic_sincos #(.PIPELINED(1'b0)) dut_f (.clk(clk), .rst(rst), .in_valid(in_valid), .angle(angle),
    .out_valid(ov[1]), .sin_o(so[1]), .cos_o(co[1]), .z_o(zo[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a, input int ec, input int es, input int ez);
    int c, s, z, q;
    int lat [2];
    sincos_ref(a, c, s, z, q);
    checks++;
    if (c != ec || s != es || z != ez) begin
      failures++;  $display("FAIL reference model disagrees at %0d degrees", a);
    end
    @(negedge clk);
    in_valid = 1'b1;  angle = 9'(a);
    @(negedge clk);
    in_valid = 1'b0;
    lat = '{0, 0};
    for (int n = 1; n <= 5; n++) begin
      for (int k = 0; k < 2; k++)
        if (ov[k] && lat[k] == 0) begin
          lat[k] = n;
          checks++;
          if (co[k] != 8'(ec) || so[k] != 8'(es) || zo[k] != 8'(ez)) begin
            failures++;
            $display("FAIL config %0d, %0d degrees: cos %0d sin %0d z %0d", k, a, co[k], so[k], zo[k]);
          end else
            $display("%s, %0d degrees: cos %0d sin %0d zout %0d after %0d clocks",
                     k == 0 ? "pipelined  " : "unpipelined", a, co[k], so[k], zo[k], n);
        end
      @(negedge clk);
    end
    checks += 2;
    if (lat[0] != 3) begin failures++; $display("FAIL pipelined latency %0d", lat[0]); end
    if (lat[1] != 1) begin failures++; $display("FAIL unpipelined latency %0d", lat[1]); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(60, 50, 86, 1);
    run(45, 69, 72, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
