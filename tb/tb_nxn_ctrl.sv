// tb_nxn_ctrl: self-checking test of the N x N controller with the 2x2 SVD
// replaced by a model of its timing (valid and tag delayed by 12
// computational cycles). Runs several (N, MI, sweeps) jobs and checks:
//   * run time from start to done of 4 * (sweeps*(N-1)*R + RMIN + 1) clocks,
//     R = max(MI*N/2, RMIN), RMIN = N + 13, and busy/done behaviour;
//   * every SVD issue reads a diagonal 2x2 block (rows and columns p, q of
//     one matrix slot, p < q) in phase 3;
//   * per matrix, each group of N/2 issues is a perfect matching of
//     0..N-1, and each sweep of N-1 groups covers every pair exactly once;
//   * a matrix is never issued again before all (N/2)^2 Lambda blocks of
//     its previous permutation were written back (read-after-write hazard);
//   * per matrix and permutation, the Lambda and V write-backs cover every
//     (row pair, column pair) block exactly once, inside the matrix slot;
//   * bubble count sweeps*(N-1)*(R - MI*N/2), one J-buffer write per SVD
//     result, and the V identity load at start.
module tb_nxn_ctrl;

  localparam int NMAX = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [3:0] cfg_n;
  logic [4:0] cfg_mi;
  logic [2:0] cfg_sweeps;
  logic [1:0] ph;
  logic busy, done;
  logic svd_valid_in, svd_valid_out;
  logic [15:0] svd_tag_in, svd_tag_out;
  logic jb_we, jb_wbank, jb_rbank, sel_diag;
  logic [1:0] jb_widx, jl_ridx, jr_ridx, dg_ridx;
  logic [4:0] io_rd_r0, io_rd_r1, io_wr_r0, io_wr_r1;
  logic [2:0] io_rd_c0, io_rd_c1, io_wr_c0, io_wr_c1;
  logic io_wr_en, v_init, v_wr_en;
  logic [2:0] v_n2;
  logic [3:0] v_rd_row, v_wr_row;
  logic [2:0] v_rd_c0, v_rd_c1, v_wr_c0, v_wr_c1;
  logic evt_issue, evt_bubble, evt_mul, evt_perm, evt_sweep;

  nxn_ctrl #(.NMAX(NMAX), .IO_ROWS(32), .V_ROWS(16), .TAGW(16)) dut (.*);

  // timing model of the 2x2 SVD: 12 computational cycles
  logic        pv [12];
  logic [15:0] pt [12];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 12; i++) begin pv[i] <= 1'b0; pt[i] <= '0; end
    end else if (ph == 2'd3) begin
      pv[0] <= svd_valid_in; pt[0] <= svd_tag_in;
      for (int i = 1; i < 12; i++) begin pv[i] <= pv[i-1]; pt[i] <= pt[i-1]; end
    end
  end
  assign svd_valid_out = pv[11];
  assign svd_tag_out   = pt[11];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // monitors (reset per job)
  int n_cur = 8;
  int iss [16];              // issues per matrix
  int lamw [16];             // Lambda block writes per matrix
  int vw [16];               // V block writes per matrix
  int ip [16][64], iq [16][64];
  int lcov [16][8][8];       // Lambda block coverage in the current permutation
  int vcov [16][8][8];
  int n_bub, n_jbw, n_init, n_issue;

  always @(posedge clk) if (rst_n && busy) begin
    int m, n2;
    n2 = n_cur / 2;
    if (ph == 2'd3 && svd_valid_in) begin
      m = int'(io_rd_r0) / n_cur;
      n_issue++;
      check(int'(io_rd_r1) / n_cur == m && int'(io_rd_r0) % n_cur == int'(io_rd_c0) &&
            int'(io_rd_r1) % n_cur == int'(io_rd_c1) && io_rd_c0 < io_rd_c1,
            $sformatf("issue reads a diagonal block: rows %0d,%0d cols %0d,%0d",
                      io_rd_r0, io_rd_r1, io_rd_c0, io_rd_c1));
      if (iss[m] % n2 == 0)
        check(lamw[m] == (iss[m] / n2) * n2 * n2,
              $sformatf("matrix %0d issued before its write-back finished (%0d of %0d)",
                        m, lamw[m], (iss[m] / n2) * n2 * n2));
      if (iss[m] < 64) begin ip[m][iss[m]] = io_rd_c0; iq[m][iss[m]] = io_rd_c1; end
      iss[m]++;
    end
    if (ph == 2'd3 && evt_bubble) n_bub++;
    if (jb_we) n_jbw++;
    if (io_wr_en) begin
      m = int'(io_wr_r0) / n_cur;
      check(int'(io_wr_r1) / n_cur == m && io_wr_r0 < io_wr_r1 && io_wr_c0 < io_wr_c1 &&
            io_wr_c1 < n_cur, "Lambda write inside one matrix slot");
      if (lamw[m] % (n2 * n2) == 0)
        for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) lcov[m][a][b] = 0;
      lcov[m][int'(io_wr_r0) % n_cur][io_wr_c0]++;
      lcov[m][int'(io_wr_r1) % n_cur][io_wr_c1]++;
      lcov[m][int'(io_wr_r0) % n_cur][io_wr_c1]++;
      lcov[m][int'(io_wr_r1) % n_cur][io_wr_c0]++;
      lamw[m]++;
      if (lamw[m] % (n2 * n2) == 0)
        for (int a = 0; a < n_cur; a++) for (int b = 0; b < n_cur; b++)
          check(lcov[m][a][b] == 1, $sformatf("Lambda entry (%0d,%0d) of matrix %0d written %0d times in a permutation",
                                              a, b, m, lcov[m][a][b]));
    end
    if (v_wr_en) begin
      m = int'(v_wr_row) / n2;
      check(v_wr_c0 < v_wr_c1 && v_wr_c1 < n_cur, "V write columns");
      if (vw[m] % (n2 * n2) == 0)
        for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) vcov[m][a][b] = 0;
      vcov[m][int'(v_wr_row) % n2][v_wr_c0]++;
      vcov[m][int'(v_wr_row) % n2][v_wr_c1]++;
      vw[m]++;
      if (vw[m] % (n2 * n2) == 0)
        for (int a = 0; a < n2; a++) for (int b = 0; b < n_cur; b++)
          check(vcov[m][a][b] == 1, $sformatf("V entry (%0d,%0d) of matrix %0d written %0d times in a permutation",
                                              a, b, m, vcov[m][a][b]));
    end
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // the identity load happens in the start clock, before busy rises
  always @(posedge clk) if (rst_n && v_init) begin
    n_init++;
    check(int'(v_n2) == n_cur / 2, "V identity load size");
  end

  task automatic run_job(input int n, input int mi, input int sweeps);
    longint t0, t_exp;
    int rmin, rlen, n2;
    n2 = n / 2;
    n_cur = n;
    for (int m = 0; m < 16; m++) begin iss[m] = 0; lamw[m] = 0; vw[m] = 0; end
    n_bub = 0; n_jbw = 0; n_init = 0; n_issue = 0;
    @(negedge clk);
    cfg_n = 4'(n); cfg_mi = 5'(mi); cfg_sweeps = 3'(sweeps);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    rmin = n + 13;
    rlen = (mi * n2 > rmin) ? mi * n2 : rmin;
    t_exp = 4 * (longint'(sweeps) * (n - 1) * rlen + rmin + 1);
    check(cyc - t0 >= t_exp - 4 && cyc - t0 <= t_exp + 4,
          $sformatf("N=%0d MI=%0d sweeps=%0d: %0d clocks, expected %0d", n, mi, sweeps, cyc - t0, t_exp));
    @(negedge clk);
    check(!busy && !done, "idle one clock after done");
    check(n_issue == sweeps * (n - 1) * mi * n2, $sformatf("issue count %0d", n_issue));
    check(n_bub == sweeps * (n - 1) * (rlen - mi * n2), $sformatf("bubble count %0d", n_bub));
    check(n_jbw == n_issue, "one J-buffer write per SVD result");
    check(n_init == 1, "V identity loaded once");
    for (int m = 0; m < mi; m++) begin
      check(lamw[m] == sweeps * (n - 1) * n2 * n2, $sformatf("Lambda writes of matrix %0d: %0d", m, lamw[m]));
      check(vw[m] == sweeps * (n - 1) * n2 * n2, $sformatf("V writes of matrix %0d: %0d", m, vw[m]));
      for (int s = 0; s < sweeps; s++) begin
        int seen [8][8];
        for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) seen[a][b] = 0;
        for (int g = 0; g < n - 1; g++) begin
          int used [8];
          for (int a = 0; a < 8; a++) used[a] = 0;
          for (int v = 0; v < n2; v++) begin
            int k;
            k = (s * (n - 1) + g) * n2 + v;
            if (k < 64) begin
              used[ip[m][k]]++; used[iq[m][k]]++;
              seen[ip[m][k]][iq[m][k]]++;
            end
          end
          for (int a = 0; a < n; a++)
            check(used[a] == 1, $sformatf("N=%0d matrix %0d permutation %0d: index %0d used %0d times", n, m, g, a, used[a]));
        end
        for (int a = 0; a < n; a++)
          for (int b = a + 1; b < n; b++)
            check(seen[a][b] == 1, $sformatf("N=%0d matrix %0d sweep %0d: pair (%0d,%0d) %0d times", n, m, s, a, b, seen[a][b]));
      end
    end
  endtask

  initial begin
    cfg_n = 4'd8; cfg_mi = 5'd4; cfg_sweeps = 3'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_job(8, 4, 2);
    run_job(6, 5, 2);
    run_job(4, 8, 3);
    run_job(2, 16, 2);
    run_job(8, 1, 1);
    run_job(4, 2, 1);
    run_job(2, 1, 1);
    for (int k = 0; k < 4; k++) begin
      int n, mi;
      n = 2 * (1 + int'($urandom % 4));
      mi = 1 + int'($urandom % (32 / n));
      run_job(n, mi, 1 + int'($urandom % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
