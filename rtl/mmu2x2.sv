// mmu2x2: pipelined 2x2 complex matrix multiplier, p = a * b.
// The 32 real products are registered, then the complex sums are formed,
// rounded to FRAC fractional bits, saturated to W bits and registered (the
// pipeline register between multipliers and adders follows the design; the
// rounding and saturation are this design's choice).
// Timing: a and b sampled at the end of clock t, p valid during clock t+2.
// One product per clock.
module mmu2x2
  import napsvd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mat2_t a,
  input  mat2_t b,
  output mat2_t p
);

  typedef logic signed [2*W-1:0] prod_t;
  // pr[i][j][k]: a(i,k)*b(k,j) parts; index 0: re*re, 1: im*im, 2: re*im, 3: im*re
  prod_t pr [2][2][2][4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          for (int k = 0; k < 2; k++)
            for (int t = 0; t < 4; t++) pr[i][j][k][t] <= '0;
    end else begin
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          for (int k = 0; k < 2; k++) begin
            pr[i][j][k][0] <= a.e[2*i+k].re * b.e[2*k+j].re;
            pr[i][j][k][1] <= a.e[2*i+k].im * b.e[2*k+j].im;
            pr[i][j][k][2] <= a.e[2*i+k].re * b.e[2*k+j].im;
            pr[i][j][k][3] <= a.e[2*i+k].im * b.e[2*k+j].re;
          end
    end
  end

  localparam int SW = 2*W + 5;
  typedef logic signed [SW-1:0] sum_t;
  localparam sum_t HALF = sum_t'(1 <<< (FRAC-1));

  // Rounded sums, one complex entry per element of an unpacked array; the
  // packed result is assembled in a single assignment.
  cplx_t pc [4];
  always_comb begin
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        sum_t sr, si;
        sr = sum_t'(pr[i][j][0][0]) - sum_t'(pr[i][j][0][1])
           + sum_t'(pr[i][j][1][0]) - sum_t'(pr[i][j][1][1]);
        si = sum_t'(pr[i][j][0][2]) + sum_t'(pr[i][j][0][3])
           + sum_t'(pr[i][j][1][2]) + sum_t'(pr[i][j][1][3]);
        pc[2*i+j].re = sat_scal((sr + HALF) >>> FRAC);
        pc[2*i+j].im = sat_scal((si + HALF) >>> FRAC);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p.e <= {pc[3], pc[2], pc[1], pc[0]};
  end

endmodule
