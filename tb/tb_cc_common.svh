// tb_cc_common.svh: helpers shared by the testbenches of units that run on
// the 4-clock computational cycle: real-valued views of the fixed-point
// types and 2x2 complex matrix arithmetic on row-major arrays of 4.
function automatic real s2r(input scal_t v);
  return real'(v) / real'(1 << FRAC);
endfunction

function automatic real a2r(input ang_t a);
  return 2.0 * 3.14159265358979 * real'(a) / real'(1 << AW);
endfunction

task automatic to_r(input mat2_t m, output real r[4], output real i[4]);
  for (int e = 0; e < 4; e++) begin
    r[e] = s2r(m.e[e].re);
    i[e] = s2r(m.e[e].im);
  end
endtask

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

function automatic real cabs(input real r, input real i);
  return $sqrt(r*r + i*i);
endfunction

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

function automatic mat2_t rnd_mat2(input int range);
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
