// tb_pair_gen: self-checking test of the parallel-ordering pair generator
// (NMAX = 8). For every supported size N = 2, 4, 6, 8:
//   * after load, and after each advance, the N/2 pairs (p < q) are disjoint
//     and cover 0..N-1, with the outputs updating on the clock edge;
//   * the N-1 permutations of a sweep contain every one of the N(N-1)/2
//     index pairs exactly once;
//   * after N-1 advances the order repeats (the next sweep is identical);
//   * for N = 8 the first permutations equal the published sequence
//     (1,2)(3,4)(5,6)(7,8), (1,4)(2,6)(3,8)(5,7), (1,6)(4,8)(2,7)(3,5)
//     (1-based), i.e. the mesh follows the round-robin scheme.
// Sizes are switched in random order several times.
module tb_pair_gen;

  localparam int NMAX = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] n;
  logic load, adv;
  logic [2:0] p [NMAX/2];
  logic [2:0] q [NMAX/2];

  pair_gen #(.NMAX(NMAX)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // published sequence for N = 8, 0-based, first three permutations
  int ref8 [3][4][2] = '{'{'{0,1},'{2,3},'{4,5},'{6,7}},
                         '{'{0,3},'{1,5},'{2,7},'{4,6}},
                         '{'{0,5},'{3,7},'{1,6},'{2,4}}};

  task automatic run_size(input int nn);
    int seen [NMAX][NMAX];
    int first [NMAX/2][2];
    for (int a = 0; a < NMAX; a++) for (int b = 0; b < NMAX; b++) seen[a][b] = 0;
    @(negedge clk);
    n = 4'(nn); load = 1'b1; adv = 1'b0;
    @(negedge clk);
    load = 1'b0;
    for (int v = 0; v < nn / 2; v++) begin first[v][0] = p[v]; first[v][1] = q[v]; end
    for (int perm = 0; perm < nn; perm++) begin
      int used [NMAX];
      for (int i = 0; i < NMAX; i++) used[i] = 0;
      for (int v = 0; v < nn / 2; v++) begin
        check(p[v] < q[v] && q[v] < nn, $sformatf("N=%0d perm %0d pair %0d = (%0d,%0d)", nn, perm, v, p[v], q[v]));
        if (q[v] < nn) begin
          used[p[v]]++; used[q[v]]++;
          if (perm < nn - 1) seen[p[v]][q[v]]++;
        end
        if (nn == 8 && perm < 3) begin
          bit found = 1'b0;
          for (int w = 0; w < 4; w++)
            if (ref8[perm][w][0] == p[v] && ref8[perm][w][1] == q[v]) found = 1'b1;
          check(found, $sformatf("N=8 perm %0d pair (%0d,%0d) not in the published order", perm, p[v], q[v]));
        end
        if (perm == nn - 1)
          check(p[v] == first[v][0] && q[v] == first[v][1],
                $sformatf("N=%0d order repeats after N-1 advances", nn));
      end
      for (int i = 0; i < nn; i++)
        check(used[i] == 1, $sformatf("N=%0d perm %0d index %0d used %0d times", nn, perm, i, used[i]));
      // advance: outputs must not change before the clock edge
      begin
        logic [2:0] bp, bq;
        bp = p[nn / 2 - 1]; bq = q[nn / 2 - 1];
        adv = 1'b1;
        #1;
        check(p[nn / 2 - 1] == bp && q[nn / 2 - 1] == bq, "stable before the edge");
      end
      @(negedge clk);
      adv = 1'b0;
      // occasionally hold for a clock: no change without adv
      if ($urandom % 3 == 0) begin
        logic [2:0] hp, hq;
        hp = p[nn / 2 - 1]; hq = q[nn / 2 - 1];
        @(negedge clk);
        check(p[nn / 2 - 1] == hp && q[nn / 2 - 1] == hq, "hold without adv");
      end
    end
    for (int a = 0; a < nn; a++)
      for (int b = a + 1; b < nn; b++)
        check(seen[a][b] == 1, $sformatf("N=%0d pair (%0d,%0d) seen %0d times in a sweep", nn, a, b, seen[a][b]));
  endtask

  initial begin
    n = 4'd8; load = 1'b0; adv = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_size(8); run_size(6); run_size(4); run_size(2);
    for (int k = 0; k < 8; k++) run_size(2 * (1 + int'($urandom % 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
