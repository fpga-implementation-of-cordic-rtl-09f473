// tb_rsd_hybrid_adder: random and corner checks of S = X + Y, where X is a
// random signed-digit number (both bit vectors random, so every digit value
// -1, 0, 1 and the redundant encodings occur) and Y an unsigned number.
// The value of S is summed digit by digit and compared with the integer sum.
module tb_rsd_hybrid_adder;
  localparam int W = 8;
  logic [W-1:0] x_p, x_n, y;
  logic [W:0]   s_p, s_n;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  rsd_hybrid_adder #(.W(W)) dut (.x_p(x_p), .x_n(x_n), .y(y), .s_p(s_p), .s_n(s_n));

  always #5 clk = ~clk;

  function automatic int sd_value(input logic [W:0] p, input logic [W:0] n);
    int v = 0;
    for (int i = 0; i <= W; i++) v += (int'(p[i]) - int'(n[i])) * (1 << i);
    return v;
  endfunction

  task automatic check_one(input logic [W-1:0] ap, input logic [W-1:0] an, input logic [W-1:0] b);
    int expv;
    x_p = ap;  x_n = an;  y = b;
    @(posedge clk);
    expv = sd_value({1'b0, ap}, {1'b0, an}) + int'(b);
    checks++;
    if (sd_value(s_p, s_n) != expv) begin
      failures++;
      if (failures < 10)
        $display("FAIL x_p=%h x_n=%h y=%h: got %0d want %0d", ap, an, b, sd_value(s_p, s_n), expv);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, '0);
    check_one('1, '0, '1);
    check_one('0, '1, '1);
    check_one('0, '1, '0);
    check_one('1, '1, '1);
    for (int k = 0; k < 20000; k++) check_one(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
