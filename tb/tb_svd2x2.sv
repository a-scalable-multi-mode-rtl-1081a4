// tb_svd2x2: self-checking test of the 2x2 SVD generator.
// Feeds one random complex 2x2 matrix per computational cycle (entries in
// [-1, 1)), then checks for every result, using real arithmetic in the
// testbench: J_l and J_r are unitary, J_l M J_r is diagonal, and its
// diagonal magnitudes match the singular values of M (closed form from the
// eigenvalues of M^H M). It also checks that each result arrives exactly 12
// computational cycles after its input was sampled, i.e. a throughput of one
// SVD per 4 clocks and the stated latency.
module tb_svd2x2;
  import napsvd_pkg::*;

  localparam int NT = 60;
  localparam real TOL_UNIT = 0.06;
  localparam real TOL_OFF  = 0.16;
  localparam real TOL_SV   = 0.10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] ph;
  cordic_cfg_t cfg;
  logic valid_in, valid_out;
  logic [15:0] tag_in, tag_out;
  mat2_t m_in, m_out, jl, jr;

  int checks = 0, failures = 0;
  int ccount = 0;               // computational cycle counter

  always #5 clk = ~clk;

  svd2x2 #(.TAGW(16)) dut (.*);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0; else ph <= ph + 2'd1;

  real mre [NT][4];
  real mim [NT][4];
  int  t_in_cc [NT];

  function automatic real s2r(input scal_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // complex helpers on arrays of 4 (row major)
  task automatic mul2(input real ar[4], input real ai[4], input real br[4], input real bi[4],
                      output real cr[4], output real ci[4]);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        cr[2*i+j] = 0.0; ci[2*i+j] = 0.0;
        for (int k = 0; k < 2; k++) begin
          cr[2*i+j] += ar[2*i+k]*br[2*k+j] - ai[2*i+k]*bi[2*k+j];
          ci[2*i+j] += ar[2*i+k]*bi[2*k+j] + ai[2*i+k]*br[2*k+j];
        end
      end
  endtask

  function automatic real unit_err(input real ar[4], input real ai[4]);
    // || A^H A - I ||_max
    real e, gr, gi;
    e = 0.0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        gr = 0.0; gi = 0.0;
        for (int k = 0; k < 2; k++) begin
          gr += ar[2*k+i]*ar[2*k+j] + ai[2*k+i]*ai[2*k+j];
          gi += ar[2*k+i]*ai[2*k+j] - ai[2*k+i]*ar[2*k+j];
        end
        if (i == j) gr -= 1.0;
        if ($sqrt(gr*gr + gi*gi) > e) e = $sqrt(gr*gr + gi*gi);
      end
    return e;
  endfunction

  // Driver: one input per computational cycle, sampled at the end of phase 3.
  int sent = 0;
  always_ff @(posedge clk) begin
    if (rst_n && ph == 2'd3) begin
      ccount <= ccount + 1;
      if (sent < NT) begin
        t_in_cc[sent] <= ccount;
        sent <= sent + 1;
      end
    end
  end

  always_comb begin
    valid_in = (sent < NT);
    tag_in   = 16'(sent);
    m_in = (sent < NT) ? m_of(sent) : '0;
  end

  int got = 0;
  real max_off = 0.0, max_sv = 0.0, max_u = 0.0;

  // Monitor: outputs valid during a whole cycle; inspect them in phase 1.
  always @(posedge clk) begin
    if (rst_n && ph == 2'd1 && valid_out) begin
      real lr[4], li[4], rr[4], ri[4], ar[4], ai[4], br[4], bi[4], xr[4], xi[4];
      real tr, det2, a11, a22, disc, s1, s2, d0, d1, hi, lo, off;
      int  n;
      n = int'(tag_out);
      for (int e = 0; e < 4; e++) begin
        lr[e] = s2r(jl.e[e].re); li[e] = s2r(jl.e[e].im);
        rr[e] = s2r(jr.e[e].re); ri[e] = s2r(jr.e[e].im);
        xr[e] = real'($rtoi(mre[n][e] * (1 << FRAC))) / (1 << FRAC);
        xi[e] = real'($rtoi(mim[n][e] * (1 << FRAC))) / (1 << FRAC);
      end
      // latency: sampled at the end of cycle t_in_cc, valid during +12
      check(ccount == t_in_cc[n] + 12, $sformatf("latency of SVD %0d: %0d", n, ccount - t_in_cc[n]));
      check(unit_err(lr, li) < TOL_UNIT, $sformatf("J_l unitary %0d", n));
      check(unit_err(rr, ri) < TOL_UNIT, $sformatf("J_r unitary %0d", n));
      if (unit_err(lr, li) > max_u) max_u = unit_err(lr, li);
      mul2(lr, li, xr, xi, ar, ai);
      mul2(ar, ai, rr, ri, br, bi);
      off = $sqrt(br[1]*br[1] + bi[1]*bi[1]);
      if ($sqrt(br[2]*br[2] + bi[2]*bi[2]) > off) off = $sqrt(br[2]*br[2] + bi[2]*bi[2]);
      if (off > max_off) max_off = off;
      check(off < TOL_OFF, $sformatf("off-diagonal of SVD %0d = %f", n, off));
      // singular values: eigenvalues of M^H M
      a11 = xr[0]*xr[0] + xi[0]*xi[0] + xr[2]*xr[2] + xi[2]*xi[2];
      a22 = xr[1]*xr[1] + xi[1]*xi[1] + xr[3]*xr[3] + xi[3]*xi[3];
      tr  = a11 + a22;
      begin
        real dr, di;
        dr = (xr[0]*xr[3] - xi[0]*xi[3]) - (xr[1]*xr[2] - xi[1]*xi[2]);
        di = (xr[0]*xi[3] + xi[0]*xr[3]) - (xr[1]*xi[2] + xi[1]*xr[2]);
        det2 = dr*dr + di*di;
      end
      disc = tr*tr/4.0 - det2;
      if (disc < 0.0) disc = 0.0;
      s1 = $sqrt(tr/2.0 + $sqrt(disc));
      s2 = tr/2.0 - $sqrt(disc);
      s2 = (s2 > 0.0) ? $sqrt(s2) : 0.0;
      d0 = $sqrt(br[0]*br[0] + bi[0]*bi[0]);
      d1 = $sqrt(br[3]*br[3] + bi[3]*bi[3]);
      hi = (d0 > d1) ? d0 : d1;
      lo = (d0 > d1) ? d1 : d0;
      check((hi - s1 < TOL_SV) && (s1 - hi < TOL_SV), $sformatf("sigma1 of SVD %0d: %f vs %f", n, hi, s1));
      check((lo - s2 < TOL_SV) && (s2 - lo < TOL_SV), $sformatf("sigma2 of SVD %0d: %f vs %f", n, lo, s2));
      // pass-through of the input matrix
      check(m_out == m_of(n), $sformatf("middle factor pass-through %0d", n));
      got++;
    end
  end

  function automatic mat2_t m_of(input int n);
    cplx_t c [4];
    for (int e = 0; e < 4; e++) begin
      c[e].re = scal_t'($rtoi(mre[n][e] * (1 << FRAC)));
      c[e].im = scal_t'($rtoi(mim[n][e] * (1 << FRAC)));
    end
    return '{e: {c[3], c[2], c[1], c[0]}};
  endfunction

  initial begin
    for (int n = 0; n < NT; n++)
      for (int e = 0; e < 4; e++) begin
        mre[n][e] = (real'($urandom % 512) - 256.0) / 256.0;
        mim[n][e] = (real'($urandom % 512) - 256.0) / 256.0;
      end
    cfg = '{iter_cyc: 2'd3, bypass: 2'd0, mask: 4'd0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (got == NT);
    repeat (8) @(posedge clk);
    $display("max off-diagonal %f, max unitarity error %f", max_off, max_u);
    check(got == NT, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4 * (NT + 40)) @(posedge clk);
    failures++;
    $display("watchdog expired, got %0d of %0d", got, NT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
