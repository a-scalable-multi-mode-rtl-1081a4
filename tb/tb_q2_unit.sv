// tb_q2_unit: self-checking test of the Q2 stage of the 2x2 SVD. One random
// upper triangular matrix T (complex t11, t12, real t22 >= 0, as Q1
// delivers it) per computational cycle, and a random pair (V_l1, V_r1)
// presented one cycle before the T it belongs to. For the T of cycle q,
// during cycle q+4:
//   * V_l2 and V_r2 are unitary;
//   * V_l2 T V_r2 is diagonal with real entries (within the CORDIC
//     resolution), and its diagonal magnitudes are the singular values of T;
//   * vl1_out and vr1_out are the matching V_l1 and V_r1 bit for bit.
module tb_q2_unit;
  import napsvd_pkg::*;

  localparam int NT = 150;
  localparam real TOL = 0.12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] ph;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0; else ph <= ph + 2'd1;

  cordic_cfg_t cfg;
  mat2_t t_in, vl1_in, vr1_in, vl2, vr2, vl1_out, vr1_out;

  q2_unit dut (.*);

  int checks = 0, failures = 0;
  `include "tb_cc_common.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  mat2_t ht [NT + 6], hl [NT + 6], hr [NT + 6];
  real max_off = 0.0;

  initial begin
    cfg = '{iter_cyc: 2'd3, bypass: 2'd0, mask: 4'd0};
    t_in = '0; vl1_in = '0; vr1_in = '0;
    for (int k = 0; k < NT + 6; k++) begin
      ht[k] = rnd_mat2(1 << FRAC);
      ht[k].e[2] = '0;
      ht[k].e[3].im = '0;
      if (ht[k].e[3].re < 0) ht[k].e[3].re = -ht[k].e[3].re;
      hl[k] = rnd_mat2(1 << FRAC);
      hr[k] = rnd_mat2(1 << FRAC);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NT + 5; k++) begin
      @(negedge clk);
      while (ph != 2'd0) @(negedge clk);
      if (k >= 4 && k - 4 < NT) begin
        real lr[4], li[4], rr[4], ri[4], tr[4], ti[4], ar[4], ai[4], dr[4], di[4];
        real a11, a22, tra, det2, disc, s1, s2, d0, d1, off;
        int q;
        q = k - 4;
        if (q > 0)   // the pair of input 0 would have been sampled before the start
          check(vl1_out === hl[q] && vr1_out === hr[q], $sformatf("V_l1/V_r1 pass-through of input %0d", q));
        to_r(vl2, lr, li); to_r(vr2, rr, ri); to_r(ht[q], tr, ti);
        check(unit_err(lr, li) < 0.03, $sformatf("V_l2 unitary, input %0d", q));
        check(unit_err(rr, ri) < 0.03, $sformatf("V_r2 unitary, input %0d", q));
        mul2(lr, li, tr, ti, ar, ai);
        mul2(ar, ai, rr, ri, dr, di);
        off = cabs(dr[1], di[1]);
        if (cabs(dr[2], di[2]) > off) off = cabs(dr[2], di[2]);
        if (off > max_off) max_off = off;
        check(off < TOL, $sformatf("off-diagonal of input %0d = %f", q, off));
        check(di[0] < TOL && -di[0] < TOL && di[3] < TOL && -di[3] < TOL,
              $sformatf("real diagonal, input %0d: %f %f", q, di[0], di[3]));
        a11 = tr[0]*tr[0] + ti[0]*ti[0];
        a22 = tr[1]*tr[1] + ti[1]*ti[1] + tr[3]*tr[3];
        tra = a11 + a22;
        det2 = a11 * tr[3] * tr[3];
        disc = tra*tra/4.0 - det2;
        if (disc < 0.0) disc = 0.0;
        s1 = $sqrt(tra/2.0 + $sqrt(disc));
        s2 = (tra/2.0 - $sqrt(disc) > 0.0) ? $sqrt(tra/2.0 - $sqrt(disc)) : 0.0;
        d0 = cabs(dr[0], di[0]); d1 = cabs(dr[3], di[3]);
        check(((d0 > d1 ? d0 : d1) - s1) < TOL && (s1 - (d0 > d1 ? d0 : d1)) < TOL,
              $sformatf("sigma1 of input %0d", q));
        check(((d0 > d1 ? d1 : d0) - s2) < TOL && (s2 - (d0 > d1 ? d1 : d0)) < TOL,
              $sformatf("sigma2 of input %0d", q));
      end
      t_in   = (k < NT) ? ht[k] : '0;
      vl1_in = hl[k + 1];
      vr1_in = hr[k + 1];
    end
    $display("largest off-diagonal %f", max_off);
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
