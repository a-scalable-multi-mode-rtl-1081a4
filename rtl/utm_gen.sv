// utm_gen: 2x2 unitary transformation matrix generator, two computational
// stages.
//   stage 1: one rotation CORDIC turns (1, 0) by phi, giving cos(phi) and
//            sin(phi) on x and y.
//   stage 2: four rotation CORDICs turn (cos, 0) and (sin, 0) by the two phase
//            angles, giving the complex matrix entries.
// LEFT = 1 builds V_l(phi, ta, tb) = [ c e^{j ta}  -s e^{j tb} ;  s e^{j ta}  c e^{j tb} ]
// LEFT = 0 builds V_r(phi, ta, tb) = [ c e^{j ta}   s e^{j ta} ; -s e^{j tb}  c e^{j tb} ]
// Timing: phi, ta and tb are read during phase 0 of computational cycle k
// (ta/tb are also sampled at the end of cycle k); the matrix is valid during
// computational cycle k+2.
module utm_gen
  import napsvd_pkg::*;
#(
  parameter bit LEFT = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ph,
  input  cordic_cfg_t cfg,
  input  ang_t        phi,
  input  ang_t        ta,
  input  ang_t        tb,
  output mat2_t       m
);

  cval_t c, s;
  ang_t  unused_z0;
  ang_t  ta_q, tb_q;

  cordic #(.VEC(1'b0), .POST(1'b1)) u_cs (
    .clk, .rst_n, .ph, .cfg,
    .x_in(s2c(ONE)), .y_in('0), .z_in(phi),
    .x_out(c), .y_out(s), .z_out(unused_z0)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ta_q <= '0;
      tb_q <= '0;
    end else if (ph == 2'd3) begin
      ta_q <= ta;
      tb_q <= tb;
    end
  end

  // Stage 2: x_in of each rotation unit and its angle.
  cval_t xin [4];
  ang_t  zin [4];
  cval_t xo  [4];
  cval_t yo  [4];
  ang_t  zo  [4];

  always_comb begin
    xin[0] = c; zin[0] = ta_q;   // c e^{j ta}
    xin[1] = s; zin[1] = ta_q;   // s e^{j ta}
    xin[2] = s; zin[2] = tb_q;   // s e^{j tb}
    xin[3] = c; zin[3] = tb_q;   // c e^{j tb}
  end

  for (genvar g = 0; g < 4; g++) begin : g_rot
    cordic #(.VEC(1'b0), .POST(1'b1)) u_rot (
      .clk, .rst_n, .ph, .cfg,
      .x_in(xin[g]), .y_in('0), .z_in(zin[g]),
      .x_out(xo[g]), .y_out(yo[g]), .z_out(zo[g])
    );
  end

  cplx_t r [4];
  always_comb begin
    for (int g = 0; g < 4; g++) begin
      r[g].re = c2s(xo[g]);
      r[g].im = c2s(yo[g]);
    end
    if (LEFT) begin
      m.e[0] = r[0];
      m.e[1] = cneg(r[2]);
      m.e[2] = r[1];
      m.e[3] = r[3];
    end else begin
      m.e[0] = r[0];
      m.e[1] = r[1];
      m.e[2] = cneg(r[2]);
      m.e[3] = r[3];
    end
  end

endmodule
