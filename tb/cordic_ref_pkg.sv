// cordic_ref_pkg: reference model for the testbenches.
//
// Recomputes the multiplexer-based CORDIC with ordinary integer arithmetic:
// stages 1-3 of x/y are worked out exactly in real numbers from x0 = 61,
// y0 = 0 and rounded down (the precomputed constants), stages 4-6 use
// arithmetic right shifts, and the angle column uses 45, 27, 14, 7, 4, 2.
// It shares no code with the design.
package cordic_ref_pkg;

  function automatic void core_ref(input int theta, output int c, output int s, output int z,
                                   output bit neg1, output bit neg2);
    int  ang [6] = '{45, 27, 14, 7, 4, 2};
    real xr, yr, xt;
    int  x, y, xn;
    z  = theta;
    xr = 61.0;  yr = 0.0;
    for (int i = 0; i < 3; i++) begin
      if (i == 1) neg1 = (z < 0);
      if (i == 2) neg2 = (z < 0);
      if (z >= 0) begin
        xt = xr - yr / (2.0 ** i);  yr = yr + xr / (2.0 ** i);  z = z - ang[i];
      end else begin
        xt = xr + yr / (2.0 ** i);  yr = yr - xr / (2.0 ** i);  z = z + ang[i];
      end
      xr = xt;
    end
    x = $rtoi($floor(xr + 1.0e-9));
    y = $rtoi($floor(yr + 1.0e-9));
    for (int i = 3; i < 6; i++) begin
      if (z >= 0) begin
        xn = x - (y >>> i);  y = y + (x >>> i);  z = z - ang[i];
      end else begin
        xn = x + (y >>> i);  y = y - (x >>> i);  z = z + ang[i];
      end
      x = xn;
    end
    c = x;  s = y;
  endfunction

  // Full-circle model: fold into 0..90, run the core model, restore signs.
  function automatic void sincos_ref(input int angle, output int c, output int s, output int z,
                                     output int quad);
    int  th, cc, ss;
    bit  n1, n2;
    if (angle <= 90)       begin quad = 0; th = angle;       end
    else if (angle <= 180) begin quad = 1; th = 180 - angle; end
    else if (angle <= 270) begin quad = 2; th = angle - 180; end
    else                   begin quad = 3; th = 360 - angle; end
    core_ref(th, cc, ss, z, n1, n2);
    c = (quad == 1 || quad == 2) ? -cc : cc;
    s = (quad == 2 || quad == 3) ? -ss : ss;
  endfunction

endpackage
