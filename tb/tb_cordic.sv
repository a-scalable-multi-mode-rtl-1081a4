// tb_cordic: self-checking test of the CORDIC unit in both modes.
// Rotation: random vectors turned by random angles, compared with
// $cos/$sin; vectoring: random vectors, magnitude and angle compared with
// $sqrt/$atan2. Tolerances follow from the number of micro-rotations
// (angle error below atan(2**-(n-1))). Also checks the runtime precision
// knobs: fewer micro-rotations give a larger error bound and the LSB mask
// clears the masked bits of the unscaled result, and that one operation completes per
// 4-clock computational cycle with the result held for a whole cycle.
module tb_cordic;
  import napsvd_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] ph;
  cordic_cfg_t cfg;
  cval_t x_in, y_in;
  ang_t  z_in;
  cval_t rx, ry, vx, vy, nx, ny;
  ang_t  rz, vz, nz;

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0; else ph <= ph + 2'd1;

  cordic #(.VEC(1'b0), .POST(1'b1)) u_rot (
    .clk, .rst_n, .ph, .cfg, .x_in, .y_in, .z_in, .x_out(rx), .y_out(ry), .z_out(rz));
  cordic #(.VEC(1'b1), .POST(1'b1)) u_vec (
    .clk, .rst_n, .ph, .cfg, .x_in, .y_in, .z_in, .x_out(vx), .y_out(vy), .z_out(vz));
  cordic #(.VEC(1'b1), .POST(1'b0)) u_raw (
    .clk, .rst_n, .ph, .cfg, .x_in, .y_in, .z_in, .x_out(nx), .y_out(ny), .z_out(nz));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  function automatic real c2r(input cval_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  function automatic real adiff(input real a, input real b);
    real d;
    d = a - b;
    while (d > PI)  d -= 2.0 * PI;
    while (d < -PI) d += 2.0 * PI;
    return (d < 0.0) ? -d : d;
  endfunction

  real sum_g = 0.0;
  int  n_g = 0;

  // One operation: inputs applied before phase 0, results read after phase 3.
  task automatic one_op(input real xr, input real yr, input int zang, input int nmicro,
                        input int mask);
    real ang, mag, ex, ey, tol_a, tol_m, got_ang, mag_raw;
    // wait for the start of phase 3, apply inputs so they are stable in phase 0
    @(negedge clk);
    while (ph != 2'd3) @(negedge clk);
    x_in = cval_t'($rtoi(xr * (1 << FRAC)));
    y_in = cval_t'($rtoi(yr * (1 << FRAC)));
    z_in = ang_t'(zang);
    @(negedge clk);                      // phase 0: sampled
    repeat (4) @(negedge clk);           // phases 1,2,3 then next phase 0
    check(ph == 2'd0, "result phase");
    tol_a = $atan(2.0 ** (-(nmicro - 1))) * 1.1 + 0.004;
    tol_m = 0.02 + 0.01 * $sqrt(xr*xr + yr*yr)
          + 1.5 * real'(nmicro) * real'(1 << mask) / real'(1 << FRAC);
    // rotation
    ang = 2.0 * PI * real'(zang) / real'(1 << AW);
    ex  = c2r(x_in) * $cos(ang) - c2r(y_in) * $sin(ang);
    ey  = c2r(x_in) * $sin(ang) + c2r(y_in) * $cos(ang);
    mag = $sqrt(c2r(x_in)**2 + c2r(y_in)**2);
    check($sqrt((c2r(rx) - ex)**2 + (c2r(ry) - ey)**2) < tol_m + mag * tol_a,
          $sformatf("rotation (%f,%f) by %f: got (%f,%f) want (%f,%f)",
                    xr, yr, ang, c2r(rx), c2r(ry), ex, ey));
    if (mask == 0 && nmicro == 6 && mag > 0.5) begin
      sum_g += (c2r(rx)**2 + c2r(ry)**2) / (mag * mag) - 1.0;
      n_g++;
    end
    // vectoring
    got_ang = 2.0 * PI * real'(vz) / real'(1 << AW);
    if (mag > 0.1 + 8.0 * real'(1 << mask) / real'(1 << FRAC))
      check(adiff(got_ang, $atan2(c2r(y_in), c2r(x_in))) < tol_a,
            $sformatf("vectoring angle of (%f,%f): %f vs %f", xr, yr, got_ang,
                      $atan2(c2r(y_in), c2r(x_in))));
    check(c2r(vx) - mag < tol_m && mag - c2r(vx) < tol_m,
          $sformatf("vectoring magnitude of (%f,%f): %f vs %f", xr, yr, c2r(vx), mag));
    // without postprocessing the magnitude carries the CORDIC gain
    mag_raw = mag;
    for (int i = 0; i < nmicro; i++) mag_raw = mag_raw * $sqrt(1.0 + 2.0 ** (-2 * i));
    check(c2r(nx) - mag_raw < 1.7 * tol_m && mag_raw - c2r(nx) < 1.7 * tol_m,
          $sformatf("raw magnitude %f vs %f", c2r(nx), mag_raw));
    check(nz == vz, "raw and scaled angle agree");
    if (mask > 0) begin
      cval_t mk;
      mk = cval_t'((1 << mask) - 1);
      check((nx & mk) == 0 && (ny & mk) == 0,
            $sformatf("mask of %0d LSBs", mask));
    end
  endtask

  initial begin
    cfg = '{iter_cyc: 2'd3, bypass: 2'd0, mask: 4'd0};
    x_in = '0; y_in = '0; z_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // full precision: 6 micro-rotations
    for (int k = 0; k < 300; k++)
      one_op((real'($urandom % 4096) - 2048.0) / 512.0,
             (real'($urandom % 4096) - 2048.0) / 512.0, int'($urandom % 4096), 6, 0);
    // 5 micro-rotations: 3 cycles, one iterator bypassed
    cfg = '{iter_cyc: 2'd3, bypass: 2'd1, mask: 4'd0};
    for (int k = 0; k < 100; k++)
      one_op((real'($urandom % 4096) - 2048.0) / 1024.0,
             (real'($urandom % 4096) - 2048.0) / 1024.0, int'($urandom % 4096), 5, 0);
    // 4 micro-rotations: 2 cycles, and 3 LSBs masked
    cfg = '{iter_cyc: 2'd2, bypass: 2'd0, mask: 4'd3};
    for (int k = 0; k < 100; k++)
      one_op((real'($urandom % 4096) - 2048.0) / 1024.0,
             (real'($urandom % 4096) - 2048.0) / 1024.0, int'($urandom % 4096), 4, 3);
    // unit vector on the axes, every quadrant of the angle
    cfg = '{iter_cyc: 2'd3, bypass: 2'd0, mask: 4'd0};
    for (int q = 0; q < 16; q++) one_op(1.0, 0.0, q * 256 + 7, 6, 0);
    $display("mean relative gain error of rotation (6 micro-rotations): %f", sum_g / n_g);
    check(sum_g / n_g < 0.004 && sum_g / n_g > -0.004, "rotation gain unbiased");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
