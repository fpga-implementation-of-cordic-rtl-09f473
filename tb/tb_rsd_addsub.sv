// tb_rsd_addsub: exhaustive check of the redundant add/subtract unit at
// 8 bits: every a, every b, both operations, against integer arithmetic
// wrapped to 8 bits.
module tb_rsd_addsub;
  localparam int W = 8;
  logic signed [W-1:0] a, b, y;
  logic                sub;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  rsd_addsub #(.W(W)) dut (.a(a), .b(b), .sub(sub), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ai, bi, expv;
    for (int op = 0; op < 2; op++)
      for (ai = -(1 << (W-1)); ai < (1 << (W-1)); ai++)
        for (bi = -(1 << (W-1)); bi < (1 << (W-1)); bi++) begin
          a = W'(ai);  b = W'(bi);  sub = op[0];
          @(posedge clk);
          expv = op ? ai - bi : ai + bi;
          checks++;
          if (y != W'(expv)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d %s %0d: got %0d", ai, op ? "-" : "+", bi, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
