// tb_fix_model.svh: bit-exact reference of the 2x2 complex matrix product
// used by the multiplication testbenches: every entry is the exact sum of
// the complex products, rounded to nearest at FRAC fractional bits and
// saturated to the W-bit scalar range. Also a random 2x2 matrix generator
// with entries spread over +-range (in units of one LSB).
// put_e: writes entry e of a 2x2 matrix through constant indices (a
// loop-variable index into the packed matrix is avoided on purpose).
function automatic void put_e(inout mat2_t m, input int e, input cplx_t v);
  case (e)
    0: m.e[0] = v;
    1: m.e[1] = v;
    2: m.e[2] = v;
    default: m.e[3] = v;
  endcase
endfunction

function automatic mat2_t ref_mul(input mat2_t a, input mat2_t b);
  mat2_t r;
  cplx_t c;
  longint sr, si, lim;
  r = '0;
  lim = (longint'(1) << (W - 1));
  for (int i = 0; i < 2; i++)
    for (int j = 0; j < 2; j++) begin
      sr = 0; si = 0;
      for (int k = 0; k < 2; k++) begin
        sr += longint'(a.e[2*i+k].re) * longint'(b.e[2*k+j].re)
            - longint'(a.e[2*i+k].im) * longint'(b.e[2*k+j].im);
        si += longint'(a.e[2*i+k].re) * longint'(b.e[2*k+j].im)
            + longint'(a.e[2*i+k].im) * longint'(b.e[2*k+j].re);
      end
      sr = (sr + (longint'(1) << (FRAC - 1))) >>> FRAC;
      si = (si + (longint'(1) << (FRAC - 1))) >>> FRAC;
      if (sr > lim - 1) sr = lim - 1;
      if (sr < -lim)    sr = -lim;
      if (si > lim - 1) si = lim - 1;
      if (si < -lim)    si = -lim;
      c.re = scal_t'(sr);
      c.im = scal_t'(si);
      put_e(r, 2*i+j, c);
    end
  return r;
endfunction

function automatic mat2_t rnd_mat(input int range);
  mat2_t r;
  cplx_t c;
  r = '0;
  for (int e = 0; e < 4; e++) begin
    c.re = scal_t'(int'($urandom % (2 * range)) - range);
    c.im = scal_t'(int'($urandom % (2 * range)) - range);
    put_e(r, e, c);
  end
  return r;
endfunction
