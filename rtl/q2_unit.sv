// q2_unit: second two-sided transformation of the 2x2 SVD (diagonalisation
// of the upper triangular matrix T = V_l1 M V_r1 delivered by Q1).
// With a = |t11|, b = |t12|, d = |t22| and the angles th11, th12:
//   ta2 = -(th12 + th11)/2,  tb2 = (th12 - th11)/2,
//   A = Phi2 + Psi2 = atan(b / (d - a)),  B = Phi2 - Psi2 = atan(b / (d + a)),
//   V_l2 = V_l(Phi2, ta2, tb2),  V_r2 = V_r(Psi2, tb2, -tb2).
// Then V_l2 T V_r2 is real diagonal. (The sign inside the arctangent follows
// the definitions of V_l and V_r used in this design; it was checked
// numerically.)
// Four computational stages:
//   S1 (cycle q)  : three vectoring CORDICs give a, th11, b, th12, d; no kappa
//                   scaling, since only ratios of magnitudes are used.
//   S2 (cycle q+1): two vectoring CORDICs on (d-a, b) and (d+a, b) give A and
//                   B; ta2 and tb2 are registered.
//   S3-S4         : Phi2 = (A+B)/2 and Psi2 = (A-B)/2 feed two UTM generators.
// A FIFO keeps V_l1 and V_r1 of the same input for the final products.
// Timing: t_in valid during cycle q, vl1_in/vr1_in valid during cycle q-1;
// all four outputs valid during cycle q+4.
module q2_unit
  import napsvd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ph,
  input  cordic_cfg_t cfg,
  input  mat2_t       t_in,
  input  mat2_t       vl1_in,
  input  mat2_t       vr1_in,
  output mat2_t       vl2,
  output mat2_t       vr2,
  output mat2_t       vl1_out,
  output mat2_t       vr1_out
);

  // S1
  cval_t mag [3];
  cval_t yv  [3];
  ang_t  th  [3];
  scal_t xr  [3];
  scal_t xi  [3];
  always_comb begin
    xr[0] = t_in.e[0].re; xi[0] = t_in.e[0].im;   // t11
    xr[1] = t_in.e[1].re; xi[1] = t_in.e[1].im;   // t12
    xr[2] = t_in.e[3].re; xi[2] = t_in.e[3].im;   // t22
  end
  for (genvar g = 0; g < 3; g++) begin : g_s1
    cordic #(.VEC(1'b1), .POST(1'b0)) u_vec (
      .clk, .rst_n, .ph, .cfg,
      .x_in(s2c(xr[g])), .y_in(s2c(xi[g])), .z_in('0),
      .x_out(mag[g]), .y_out(yv[g]), .z_out(th[g])
    );
  end

  // S2
  cval_t dma, dpa, xa, ya, xb, yb;
  ang_t  angA, angB;
  always_comb begin
    dma = mag[2] - mag[0];
    dpa = mag[2] + mag[0];
  end
  cordic #(.VEC(1'b1), .POST(1'b0)) u_a (
    .clk, .rst_n, .ph, .cfg,
    .x_in(dma), .y_in(mag[1]), .z_in('0),
    .x_out(xa), .y_out(ya), .z_out(angA)
  );
  cordic #(.VEC(1'b1), .POST(1'b0)) u_b (
    .clk, .rst_n, .ph, .cfg,
    .x_in(dpa), .y_in(mag[1]), .z_in('0),
    .x_out(xb), .y_out(yb), .z_out(angB)
  );

  logic [AW:0]        tsum;
  logic signed [AW:0] tdif;
  ang_t               ta2, tb2;
  always_comb begin
    tsum = {1'b0, th[1]} + {1'b0, th[0]};
    tdif = $signed({1'b0, th[1]}) - $signed({1'b0, th[0]});
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ta2 <= '0;
      tb2 <= '0;
    end else if (ph == 2'd3) begin
      ta2 <= -ang_t'(tsum >> 1);
      tb2 <= ang_t'(tdif >>> 1);
    end
  end

  // S3-S4. A lies in [0, pi], B in [0, pi/2]; B is never above pi/2 while
  // A may be, so A - B is taken as a signed difference.
  logic [AW:0]        absum;
  logic signed [AW:0] abdif;
  ang_t               phi2, psi2;
  always_comb begin
    absum = {1'b0, angA} + {1'b0, angB};
    abdif = $signed({1'b0, angA}) - $signed({1'b0, angB});
    phi2  = ang_t'(absum >> 1);
    psi2  = ang_t'(abdif >>> 1);
  end

  utm_gen #(.LEFT(1'b1)) u_vl2 (
    .clk, .rst_n, .ph, .cfg,
    .phi(phi2), .ta(ta2), .tb(tb2), .m(vl2)
  );
  utm_gen #(.LEFT(1'b0)) u_vr2 (
    .clk, .rst_n, .ph, .cfg,
    .phi(psi2), .ta(tb2), .tb(-tb2), .m(vr2)
  );

  // V_l1 / V_r1 FIFO: sampled at the end of cycle q-1, read in cycle q+4.
  mat2_t fl [5];
  mat2_t fr [5];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) begin
        fl[i] <= '0;
        fr[i] <= '0;
      end
    end else if (ph == 2'd3) begin
      fl[0] <= vl1_in;
      fr[0] <= vr1_in;
      for (int i = 1; i < 5; i++) begin
        fl[i] <= fl[i-1];
        fr[i] <= fr[i-1];
      end
    end
  end
  assign vl1_out = fl[4];
  assign vr1_out = fr[4];

endmodule
