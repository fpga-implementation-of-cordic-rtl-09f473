// tb_cordic_mux_core: the CORDIC core, pipelined (default) and unpipelined,
// driven side by side. Every angle 0..90 is sent back to back, then random
// angles with idle cycles. Each result is compared with the integer reference
// model, with the true sine and cosine (within 6 counts of 100), and its
// latency is checked: 3 clocks pipelined, 1 clock unpipelined. A reset in the
// middle of a burst must drop the results in flight.
module tb_cordic_mux_core;
  import cordic_ref_pkg::*;

  logic              clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [7:0] theta = '0;
  logic              ov [2];
  logic signed [7:0] co [2];
  logic signed [7:0] so [2];
  logic signed [7:0] zo [2];
  int   checks = 0, failures = 0, cycle = 0;
  int   exp_q  [2][$];   // angle sent
  int   cyc_q  [2][$];   // cycle it was sent
  localparam int LAT [2] = '{3, 1};
  localparam real PI = 3.14159265358979;

  cordic_mux_core dut_p (.clk(clk), .rst(rst), .in_valid(in_valid), .theta(theta),
                         .out_valid(ov[0]), .cos_o(co[0]), .sin_o(so[0]), .z_o(zo[0]));
  cordic_mux_core #(.PIPELINED(1'b0)) dut_f (.clk(clk), .rst(rst), .in_valid(in_valid),
                         .theta(theta), .out_valid(ov[1]), .cos_o(co[1]), .sin_o(so[1]), .z_o(zo[1]));

  always #5 clk = ~clk;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard, sampled just after each rising edge
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && in_valid)
      for (int k = 0; k < 2; k++) begin
        exp_q[k].push_back(int'(theta));
        cyc_q[k].push_back(cycle);
      end
  end

  always @(negedge clk) begin
    for (int k = 0; k < 2; k++)
      if (ov[k]) begin
        int th, c, s, z, sent;
        bit n1, n2;
        real ec, es;
        if (exp_q[k].size() == 0) begin
          failures++;  $display("FAIL core %0d: result with nothing in flight", k);
        end else begin
          th = exp_q[k].pop_front();
          sent = cyc_q[k].pop_front();
          core_ref(th, c, s, z, n1, n2);
          ec = 100.0 * $cos(th * PI / 180.0);
          es = 100.0 * $sin(th * PI / 180.0);
          checks += 3;
          if (int'(co[k]) != c || int'(so[k]) != s || int'(zo[k]) != z) begin
            failures++;
            $display("FAIL core %0d theta %0d: got (%0d,%0d,%0d) want (%0d,%0d,%0d)",
                     k, th, co[k], so[k], zo[k], c, s, z);
          end
          if (rabs(co[k] - ec) > 6.0 || rabs(so[k] - es) > 6.0) begin
            failures++;  $display("FAIL core %0d theta %0d: far from true sin/cos", k, th);
          end
          if (cycle - sent != LAT[k]) begin
            failures++;  $display("FAIL core %0d theta %0d: latency %0d", k, th, cycle - sent);
          end
          if (th == 60 && (co[k] != 50 || so[k] != 86 || zo[k] != 1)) failures++;
          if (th == 45 && zo[k] != 0) failures++;
        end
      end
  end

  task automatic send(input int th);
    in_valid <= 1'b1;  theta <= 8'(th);
    @(posedge clk);
  endtask

  task automatic idle(input int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    send(60);                       // single operation
    idle(6);
    for (int t = 0; t <= 90; t++) send(t);   // back to back, one per clock
    idle(6);
    for (int n = 0; n < 200; n++) begin      // random with idle cycles
      send(int'($urandom_range(90)));
      idle($urandom_range(2));
    end
    idle(6);
    // reset during a burst: results in flight are dropped
    send(10);  send(20);
    rst <= 1'b1;  in_valid <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      exp_q[k].delete();  cyc_q[k].delete();
    end
    rst <= 1'b0;
    idle(6);
    checks++;
    if (ov[0] || ov[1]) begin
      failures++;  $display("FAIL valid still set after reset");
    end
    send(45);
    idle(6);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin
        failures++;  $display("FAIL core %0d: %0d results missing", k, exp_q[k].size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
