// tb_napsvd_top: end-to-end test of the SVD precoder at its default size
// (NMAX = 8, 32 x 8 IO register file).
// Runs several jobs back to back, switching the matrix size (multi-mode) and
// the precision between them, with the per-size settings of the design's
// precision table (micro-rotations; word width as 13 bits minus masked LSBs):
//   8x8, 4 matrices, 4 sweeps, 6 micro-rotations, 13 bit (the largest case)
//   6x6, 5 matrices, 3 sweeps, 5 micro-rotations (one iterator bypassed), 12 bit
//   4x4, 8 matrices, 2 sweeps, 5 micro-rotations, 12 bit
//   4x4, 2 matrices, 2 sweeps (too few matrices: idle issue slots)
//   2x2, 16 matrices, 1 sweep, 4 micro-rotations, 10 bit
// Random complex inputs with real and imaginary parts in [-0.5, 0.5).
// For every matrix the testbench checks, in real arithmetic of its own:
//   * V is unitary;
//   * the Frobenius norm of Lambda equals that of M (unitary invariance);
//   * the off-diagonal part of Lambda is small relative to ||M|| (bound set
//     by the CORDIC angle resolution) and at most half that of M;
//   * the column norms of M*V equal those of Lambda (M V = U Lambda);
//   * the largest diagonal magnitude equals sigma_max(M), found by power
//     iteration on M^H M.
// It also checks the run time in clocks against 4 * (sweeps*(N-1)*R + RMIN+1)
// with R = max(MI*N/2, N+13), RMIN = N+13, and that each mechanism happened:
// SVD issues, idle issue slots, multiplication slots, permutation advances,
// sweep ends and size switches.
module tb_napsvd_top;
  import napsvd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [3:0] cfg_n;
  logic [4:0] cfg_mi;
  logic [2:0] cfg_sweeps;
  cordic_cfg_t cfg_cordic;
  logic busy, done;
  logic io_we = 1'b0;
  logic [4:0] io_row;
  logic [2:0] io_col;
  cplx_t io_wdata, io_rdata;
  logic [3:0] v_row;
  logic v_half;
  logic [2:0] v_col;
  cplx_t v_rdata;
  logic evt_issue, evt_bubble, evt_mul, evt_perm, evt_sweep;

  napsvd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_issue = 0, n_bubble = 0, n_mul = 0, n_perm = 0, n_sweep = 0, n_modes = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (evt_issue)  n_issue++;
    if (evt_bubble) n_bubble++;
    if (evt_mul)    n_mul++;
    if (evt_perm)   n_perm++;
    if (evt_sweep)  n_sweep++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  real mr [16][8][8];
  real mi [16][8][8];

  function automatic real s2r(input scal_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  task automatic run_job(input int n, input int nmat, input int sweeps,
                         input int icyc, input int byp, input int msk,
                         input real tol_off);
    real lr [8][8], li [8][8], vr [8][8], vi [8][8];
    real fro_m, fro_l, off, off_m, e, ur, ui, cr, ci, nm, nl, smax, dmax;
    real xr [8], xi [8], yr [8], yi [8];
    longint t0, t1, t_exp;
    int rlen, rmin;
    real tol_g;
    // gain tolerance: masked LSBs are truncated, which shrinks magnitudes
    tol_g = 0.07 + 0.03 * msk;
    // load
    for (int m = 0; m < nmat; m++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          scal_t a, b;
          a = scal_t'((int'($urandom % 256) - 128) <<< (FRAC - 8));
          b = scal_t'((int'($urandom % 256) - 128) <<< (FRAC - 8));
          mr[m][i][j] = s2r(a);
          mi[m][i][j] = s2r(b);
          @(negedge clk);
          io_we = 1'b1;
          io_row = 5'(m * n + i);
          io_col = 3'(j);
          io_wdata = '{re: a, im: b};
        end
    @(negedge clk);
    io_we = 1'b0;
    cfg_n = 4'(n);
    cfg_mi = 5'(nmat);
    cfg_sweeps = 3'(sweeps);
    cfg_cordic = '{iter_cyc: 2'(icyc), bypass: 2'(byp), mask: 4'(msk)};
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    check(busy == 1'b1, "busy after start");
    wait (done == 1'b1);
    t1 = cyc;
    @(negedge clk);
    check(busy == 1'b0, "idle after done");
    n_modes++;
    rmin = n + 13;
    rlen = (nmat * n / 2 > rmin) ? nmat * n / 2 : rmin;
    t_exp = 4 * (longint'(sweeps) * (n - 1) * rlen + rmin + 1);
    $display("N=%0d MI=%0d sweeps=%0d: %0d clocks (expected %0d, %0d per matrix)",
             n, nmat, sweeps, t1 - t0, t_exp, (t1 - t0) / nmat);
    check((t1 - t0 >= t_exp - 4) && (t1 - t0 <= t_exp + 4),
          $sformatf("run time %0d vs %0d clocks", t1 - t0, t_exp));
    // read back and check every matrix
    for (int m = 0; m < nmat; m++) begin
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          io_row = 5'(m * n + i);
          io_col = 3'(j);
          v_row = 4'(m * n / 2 + i / 2);
          v_half = 1'(i % 2);
          v_col = 3'(j);
          #1;
          lr[i][j] = s2r(io_rdata.re); li[i][j] = s2r(io_rdata.im);
          vr[i][j] = s2r(v_rdata.re);  vi[i][j] = s2r(v_rdata.im);
        end
      // norms
      fro_m = 0.0; fro_l = 0.0; off = 0.0; off_m = 0.0;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          fro_m += mr[m][i][j]**2 + mi[m][i][j]**2;
          fro_l += lr[i][j]**2 + li[i][j]**2;
          if (i != j) off += lr[i][j]**2 + li[i][j]**2;
          if (i != j) off_m += mr[m][i][j]**2 + mi[m][i][j]**2;
        end
      fro_m = $sqrt(fro_m); fro_l = $sqrt(fro_l); off = $sqrt(off); off_m = $sqrt(off_m);
      check(fro_l > (1.0 - tol_g) * fro_m && fro_l < (1.0 + tol_g) * fro_m,
            $sformatf("N=%0d m=%0d norm %f vs %f", n, m, fro_l, fro_m));
      check(off < tol_off * fro_m,
            $sformatf("N=%0d m=%0d off-diagonal %f of %f", n, m, off, fro_m));
      check(off < 0.5 * off_m,
            $sformatf("N=%0d m=%0d off-diagonal not reduced: %f from %f", n, m, off, off_m));
      // V unitary
      e = 0.0;
      for (int a = 0; a < n; a++)
        for (int b = 0; b < n; b++) begin
          ur = 0.0; ui = 0.0;
          for (int k = 0; k < n; k++) begin
            ur += vr[k][a]*vr[k][b] + vi[k][a]*vi[k][b];
            ui += vr[k][a]*vi[k][b] - vi[k][a]*vr[k][b];
          end
          if (a == b) ur -= 1.0;
          if ($sqrt(ur*ur + ui*ui) > e) e = $sqrt(ur*ur + ui*ui);
        end
      check(e < 0.12, $sformatf("N=%0d m=%0d V not unitary: %f", n, m, e));
      // column norms of M V against Lambda
      for (int j = 0; j < n; j++) begin
        nm = 0.0; nl = 0.0;
        for (int i = 0; i < n; i++) begin
          cr = 0.0; ci = 0.0;
          for (int k = 0; k < n; k++) begin
            cr += mr[m][i][k]*vr[k][j] - mi[m][i][k]*vi[k][j];
            ci += mr[m][i][k]*vi[k][j] + mi[m][i][k]*vr[k][j];
          end
          nm += cr*cr + ci*ci;
          nl += lr[i][j]**2 + li[i][j]**2;
        end
        nm = $sqrt(nm); nl = $sqrt(nl);
        check(nm - nl < 0.08 * fro_m + 0.05 && nl - nm < 0.08 * fro_m + 0.05,
              $sformatf("N=%0d m=%0d column %0d of M*V: %f vs %f", n, m, j, nm, nl));
      end
      // sigma_max by power iteration on M^H M
      for (int i = 0; i < n; i++) begin xr[i] = 1.0 + 0.1 * i; xi[i] = 0.0; end
      smax = 0.0;
      for (int it = 0; it < 200; it++) begin
        real s;
        for (int i = 0; i < n; i++) begin   // y = M x
          yr[i] = 0.0; yi[i] = 0.0;
          for (int k = 0; k < n; k++) begin
            yr[i] += mr[m][i][k]*xr[k] - mi[m][i][k]*xi[k];
            yi[i] += mr[m][i][k]*xi[k] + mi[m][i][k]*xr[k];
          end
        end
        for (int i = 0; i < n; i++) begin   // x = M^H y
          xr[i] = 0.0; xi[i] = 0.0;
          for (int k = 0; k < n; k++) begin
            xr[i] += mr[m][k][i]*yr[k] + mi[m][k][i]*yi[k];
            xi[i] += mr[m][k][i]*yi[k] - mi[m][k][i]*yr[k];
          end
        end
        s = 0.0;
        for (int i = 0; i < n; i++) s += xr[i]*xr[i] + xi[i]*xi[i];
        s = $sqrt(s);
        smax = $sqrt(s);           // ||M^H M x|| with ||x|| = 1 -> sigma^2
        for (int i = 0; i < n; i++) begin xr[i] /= s; xi[i] /= s; end
      end
      dmax = 0.0;
      for (int i = 0; i < n; i++)
        if ($sqrt(lr[i][i]**2 + li[i][i]**2) > dmax) dmax = $sqrt(lr[i][i]**2 + li[i][i]**2);
      check(dmax > (1.0 - tol_g) * smax && dmax < (1.0 + tol_g) * smax,
            $sformatf("N=%0d m=%0d largest singular value %f vs %f", n, m, dmax, smax));
      if (m == 0)
        $display("  matrix 0: |M|=%f off(Lambda)=%f sigma_max=%f diag max=%f V err=%f",
                 fro_m, off, smax, dmax, e);
    end
  endtask

  initial begin
    cfg_n = 4'd8; cfg_mi = 5'd4; cfg_sweeps = 3'd1;
    cfg_cordic = '{iter_cyc: 2'd3, bypass: 2'd0, mask: 4'd0};
    io_row = '0; io_col = '0; io_wdata = '0;
    v_row = '0; v_half = 1'b0; v_col = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // The off-diagonal bound is set by the CORDIC angle resolution: with n
    // micro-rotations each rotation angle is off by up to atan(2**-(n-1)).
    run_job(8, 4, 4, 3, 0, 0, 0.15);
    run_job(6, 5, 3, 3, 1, 1, 0.25);
    run_job(4, 8, 2, 3, 1, 1, 0.30);
    run_job(4, 2, 2, 3, 1, 1, 0.30);
    run_job(2, 16, 1, 2, 0, 3, 0.35);
    $display("events: issues=%0d idle_slots=%0d mul_slots=%0d perms=%0d sweeps=%0d size_switches=%0d",
             n_issue, n_bubble, n_mul, n_perm, n_sweep, n_modes - 1);
    check(n_issue > 0,  "SVD issues happened");
    check(n_bubble > 0, "idle issue slots happened");
    check(n_mul > 0,    "multiplication slots happened");
    check(n_perm > 0,   "permutation advances happened");
    check(n_sweep > 0,  "sweep ends happened");
    check(n_modes >= 2, "size switches happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
