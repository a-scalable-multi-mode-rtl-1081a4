// tb_q1_unit: self-checking test of the Q1 stage of the 2x2 SVD. One random
// complex matrix M per computational cycle (entries in [-1, 1)). For the
// input of cycle k:
//   * cycle k+3: m_dly is M bit for bit, vl1_early is a diagonal unitary
//     matrix with equal entries;
//   * cycle k+4: vl1 equals vl1_early of the previous cycle, V_r1 is
//     unitary, and T = V_l1 M V_r1 is upper triangular with a real (2,2)
//     entry (within the CORDIC resolution), and keeps the Frobenius norm.
module tb_q1_unit;
  import napsvd_pkg::*;

  localparam int NT = 150;
  localparam real TOL = 0.10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] ph;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0; else ph <= ph + 2'd1;

  cordic_cfg_t cfg;
  mat2_t m_in, vl1_early, m_dly, vl1, vr1;

  q1_unit dut (.*);

  int checks = 0, failures = 0;
  `include "tb_cc_common.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  mat2_t hm [NT + 5];
  mat2_t early_q;
  real max_low = 0.0;

  initial begin
    cfg = '{iter_cyc: 2'd3, bypass: 2'd0, mask: 4'd0};
    m_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NT + 4; k++) begin
      @(negedge clk);
      while (ph != 2'd0) @(negedge clk);
      if (k >= 3 && k - 3 < NT) begin
        real er[4], ei[4];
        check(m_dly === hm[k - 3], $sformatf("m_dly of input %0d", k - 3));
        to_r(vl1_early, er, ei);
        check(er[1] == 0.0 && ei[1] == 0.0 && er[2] == 0.0 && ei[2] == 0.0 &&
              vl1_early.e[0] === vl1_early.e[3], $sformatf("V_l1 diagonal, input %0d", k - 3));
        check(unit_err(er, ei) < 0.03, $sformatf("V_l1 unitary, input %0d", k - 3));
      end
      if (k >= 4 && k - 4 < NT) begin
        real lr[4], li[4], rr[4], ri[4], mr[4], mi[4], ar[4], ai[4], tr[4], ti[4];
        real fm, ft;
        check(vl1 === early_q, $sformatf("vl1 follows vl1_early, input %0d", k - 4));
        to_r(vl1, lr, li); to_r(vr1, rr, ri); to_r(hm[k - 4], mr, mi);
        check(unit_err(rr, ri) < 0.03, $sformatf("V_r1 unitary, input %0d", k - 4));
        mul2(lr, li, mr, mi, ar, ai);
        mul2(ar, ai, rr, ri, tr, ti);
        if (cabs(tr[2], ti[2]) > max_low) max_low = cabs(tr[2], ti[2]);
        check(cabs(tr[2], ti[2]) < TOL, $sformatf("t21 of input %0d = %f", k - 4, cabs(tr[2], ti[2])));
        check(ti[3] < TOL && -ti[3] < TOL, $sformatf("t22 real, input %0d: im %f", k - 4, ti[3]));
        fm = 0.0; ft = 0.0;
        for (int e = 0; e < 4; e++) begin
          fm += mr[e]*mr[e] + mi[e]*mi[e];
          ft += tr[e]*tr[e] + ti[e]*ti[e];
        end
        check($sqrt(ft) - $sqrt(fm) < 0.05 && $sqrt(fm) - $sqrt(ft) < 0.05,
              $sformatf("norm kept, input %0d", k - 4));
      end
      early_q = vl1_early;
      if (k < NT) hm[k] = rnd_mat2(1 << FRAC);
      m_in = (k < NT) ? hm[k] : '0;
    end
    $display("largest |t21| %f", max_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4 * (NT + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
