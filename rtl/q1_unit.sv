// q1_unit: first two-sided transformation of the 2x2 SVD (triangularisation).
// Produces V_l1 = diag(e^{j ta1}, e^{j ta1}) and
// V_r1 = V_r(psi1, tg1, -tg1) such that V_l1 * M * V_r1 is upper triangular
// with a real (2,2) entry, where
//   ta1  = -(theta21 + theta22)/2,  tg1 = (theta22 - theta21)/2,
//   psi1 = atan(|m21| / |m22|).
// Four computational stages, as in the design:
//   S1 (cycle k)  : two vectoring CORDICs give |m21|, theta21, |m22|, theta22.
//   S2 (cycle k+1): one vectoring CORDIC on (|m22|, |m21|) gives psi1;
//                   ta1 and tg1 are formed and registered.
//   S3 (cycle k+2): a rotation CORDIC turns (1, 0) by ta1 (the whole of V_l1,
//                   since phi1 = 0) and the V_r1 generator starts.
//   S4 (cycle k+3): the V_r1 generator finishes.
// The S1 magnitudes skip the kappa scaling: only their ratio is used (the
// design's own choice, the same argument the design makes for Q2).
// A FIFO sampled once per computational cycle delays M.
// Timing: m_in valid during cycle k. vl1_early and m_dly are valid during
// cycle k+3 (for the V_l1*M product), vl1 and vr1 during cycle k+4.
module q1_unit
  import napsvd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ph,
  input  cordic_cfg_t cfg,
  input  mat2_t       m_in,
  output mat2_t       vl1_early,
  output mat2_t       m_dly,
  output mat2_t       vl1,
  output mat2_t       vr1
);

  // S1
  cval_t mag21, mag22, y21, y22;
  ang_t  th21, th22;
  cordic #(.VEC(1'b1), .POST(1'b0)) u_v21 (
    .clk, .rst_n, .ph, .cfg,
    .x_in(s2c(m_in.e[2].re)), .y_in(s2c(m_in.e[2].im)), .z_in('0),
    .x_out(mag21), .y_out(y21), .z_out(th21)
  );
  cordic #(.VEC(1'b1), .POST(1'b0)) u_v22 (
    .clk, .rst_n, .ph, .cfg,
    .x_in(s2c(m_in.e[3].re)), .y_in(s2c(m_in.e[3].im)), .z_in('0),
    .x_out(mag22), .y_out(y22), .z_out(th22)
  );

  // S2
  cval_t xs2, ys2;
  ang_t  psi1;
  cordic #(.VEC(1'b1), .POST(1'b0)) u_psi (
    .clk, .rst_n, .ph, .cfg,
    .x_in(mag22), .y_in(mag21), .z_in('0),
    .x_out(xs2), .y_out(ys2), .z_out(psi1)
  );

  logic [AW:0]        tsum;
  logic signed [AW:0] tdif;
  ang_t               ta1, tg1;
  always_comb begin
    tsum = {1'b0, th22} + {1'b0, th21};
    tdif = $signed({1'b0, th22}) - $signed({1'b0, th21});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ta1 <= '0;
      tg1 <= '0;
    end else if (ph == 2'd3) begin
      ta1 <= -ang_t'(tsum >> 1);
      tg1 <= ang_t'(tdif >>> 1);
    end
  end

  // S3: V_l1 as a single rotation
  cval_t ec, es;
  ang_t  ez;
  cordic #(.VEC(1'b0), .POST(1'b1)) u_vl1 (
    .clk, .rst_n, .ph, .cfg,
    .x_in(s2c(ONE)), .y_in('0), .z_in(ta1),
    .x_out(ec), .y_out(es), .z_out(ez)
  );

  always_comb begin
    vl1_early.e[0] = '{re: c2s(ec), im: c2s(es)};
    vl1_early.e[1] = '0;
    vl1_early.e[2] = '0;
    vl1_early.e[3] = '{re: c2s(ec), im: c2s(es)};
  end

  // S3-S4: V_r1
  utm_gen #(.LEFT(1'b0)) u_vr1 (
    .clk, .rst_n, .ph, .cfg,
    .phi(psi1), .ta(tg1), .tb(-tg1),
    .m(vr1)
  );

  // V_l1 aligned with V_r1, and the M FIFO
  mat2_t m_q [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vl1 <= '0;
      for (int i = 0; i < 3; i++) m_q[i] <= '0;
    end else if (ph == 2'd3) begin
      vl1    <= vl1_early;
      m_q[0] <= m_in;
      m_q[1] <= m_q[0];
      m_q[2] <= m_q[1];
    end
  end
  assign m_dly = m_q[2];

endmodule
