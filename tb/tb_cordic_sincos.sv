// tb_cordic_sincos: end-to-end test of the full-circle sine/cosine unit at its
// default parameters. Every angle 0..359 is sent back to back, then random
// angles with idle cycles, then a reset in the middle of a burst. Each result
// is compared with the integer reference model and with the true sine and
// cosine (within 6 counts of 100); the latency must be 3 clocks.
// It counts how often each mechanism occurred and fails if one never did:
// each of the four quadrants, each of the four multiplexer-tree selections
// (signs of z1 and z2), each direction of stages 4-6, back-to-back results,
// idle cycles between results, and a reset flushing results in flight.
module tb_cordic_sincos;
  import cordic_ref_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam int  LAT = 3;

  logic              clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [8:0]        angle = '0;
  logic              out_valid;
  logic signed [7:0] sin_o, cos_o, z_o;
  int   checks = 0, failures = 0, cycle = 0;
  int   ang_q [$];
  int   cyc_q [$];
  int   n_quad [4];
  int   n_mux  [4];
  int   n_fwd = 0, n_bck = 0, n_b2b = 0, n_gap = 0, n_flush = 0;
  int   last_out = -10;

  cordic_sincos dut (.clk(clk), .rst(rst), .in_valid(in_valid), .angle(angle),
                     .out_valid(out_valid), .sin_o(sin_o), .cos_o(cos_o), .z_o(z_o));

  always #5 clk = ~clk;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && in_valid) begin
      ang_q.push_back(int'(angle));
      cyc_q.push_back(cycle);
    end
  end

  always @(negedge clk) begin
    if (out_valid) begin
      int a, c, s, z, q, sent, th, cc, ss, zz;
      bit n1, n2;
      real ec, es;
      if (ang_q.size() == 0) begin
        failures++;  $display("FAIL result with nothing in flight");
      end else begin
        a    = ang_q.pop_front();
        sent = cyc_q.pop_front();
        sincos_ref(a, c, s, z, q);
        ec = 100.0 * $cos(a * PI / 180.0);
        es = 100.0 * $sin(a * PI / 180.0);
        checks += 3;
        if (int'(cos_o) != c || int'(sin_o) != s || int'(z_o) != z) begin
          failures++;
          $display("FAIL angle %0d: got cos %0d sin %0d z %0d, want %0d %0d %0d",
                   a, cos_o, sin_o, z_o, c, s, z);
        end
        if (rabs(cos_o - ec) > 6.0 || rabs(sin_o - es) > 6.0) begin
          failures++;  $display("FAIL angle %0d: far from true sin/cos", a);
        end
        if (cycle - sent != LAT) begin
          failures++;  $display("FAIL angle %0d: latency %0d", a, cycle - sent);
        end
        // mechanism counters
        n_quad[q]++;
        th = (q == 0) ? a : (q == 1) ? 180 - a : (q == 2) ? a - 180 : 360 - a;
        core_ref(th, cc, ss, zz, n1, n2);
        n_mux[{n1, n2}]++;
        if (z_o >= 0) n_fwd++; else n_bck++;
        if (cycle - last_out == 1) n_b2b++;
        else if (cycle - last_out > 1 && cycle - last_out < 4) n_gap++;
        last_out = cycle;
      end
    end
  end

  task automatic send(input int a);
    in_valid <= 1'b1;  angle <= 9'(a);
    @(posedge clk);
  endtask

  task automatic idle(input int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // one complete operation: sin/cos of 60 degrees
    send(60);
    idle(LAT + 3);
    checks++;
    if (sin_o != 86 || cos_o != 50 || z_o != 1) begin
      failures++;  $display("FAIL 60 degrees: sin %0d cos %0d z %0d", sin_o, cos_o, z_o);
    end
    for (int a = 0; a < 360; a++) send(a);          // full circle, back to back
    idle(LAT + 3);
    for (int n = 0; n < 500; n++) begin             // random, with idle cycles
      send(int'($urandom_range(359)));
      idle($urandom_range(2));
    end
    idle(LAT + 3);
    // reset during a burst drops the results in flight
    send(100);  send(200);
    rst <= 1'b1;  in_valid <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    if (ang_q.size() != 0) n_flush++;
    ang_q.delete();  cyc_q.delete();
    rst <= 1'b0;
    idle(LAT + 3);
    checks++;
    if (out_valid) begin
      failures++;  $display("FAIL out_valid set after reset");
    end
    send(300);
    idle(LAT + 3);
    checks++;
    if (ang_q.size() != 0) begin
      failures++;  $display("FAIL %0d results missing", ang_q.size());
    end

    for (int q = 0; q < 4; q++) begin
      checks += 2;
      if (n_quad[q] == 0) begin failures++; $display("FAIL quadrant %0d never seen", q); end
      if (n_mux[q]  == 0) begin failures++; $display("FAIL mux selection %0d never used", q); end
    end
    checks += 5;
    if (n_fwd == 0 || n_bck == 0) begin failures++; $display("FAIL a rotation direction never used"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back results"); end
    if (n_gap == 0)   begin failures++; $display("FAIL no idle cycles between results"); end
    if (n_flush == 0) begin failures++; $display("FAIL reset never flushed a result"); end
    $display("quadrants %0d %0d %0d %0d, mux selections %0d %0d %0d %0d",
             n_quad[0], n_quad[1], n_quad[2], n_quad[3], n_mux[0], n_mux[1], n_mux[2], n_mux[3]);
    $display("last direction + %0d / - %0d, back-to-back %0d, with gaps %0d, flushes %0d",
             n_fwd, n_bck, n_b2b, n_gap, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
