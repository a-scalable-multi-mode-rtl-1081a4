// napsvd_pkg: types and constants shared by the Jacobi SVD precoder.
//
// Number formats (W, AW follow the 8x8 configuration: 13 bit per real-valued
// scalar in the IO register file and 12 bit per angle; FRAC and CW are this
// design's choice):
//   scalar  : signed W-bit two's complement, FRAC fractional bits (range +-4).
//   cordic  : signed CW-bit inside the CORDIC units, same FRAC, for head room
//             against the CORDIC gain of about 1.65 and complex magnitudes.
//   angle   : unsigned AW-bit fraction of a full turn, 2**AW == 2*pi, so the
//             two MSBs are the quadrant and sums wrap modulo 2*pi for free.
// A 2x2 complex matrix is stored row major: e[0]=m11, e[1]=m12, e[2]=m21,
// e[3]=m22.
package napsvd_pkg;

  localparam int W    = 13;          // scalar word width
  localparam int FRAC = 10;          // fractional bits of a scalar
  localparam int CW   = W + 4;       // CORDIC datapath width
  localparam int AW   = 12;          // angle width (full turn = 2**AW)
  localparam int CHAIN   = 2;        // micro-rotation iterators per CORDIC
  localparam int MAX_CYC = 3;        // iteration cycles that fit in C_S = 4
  localparam int CS      = 4;        // clocks per computational cycle
  localparam int KFRAC   = 14;       // fractional bits of the kappa table

  typedef logic signed [W-1:0]  scal_t;
  typedef logic signed [CW-1:0] cval_t;
  typedef logic [AW-1:0]        ang_t;

  typedef struct packed {
    scal_t re;
    scal_t im;
  } cplx_t;

  typedef struct packed {
    cplx_t [3:0] e;                  // e[0]=11, e[1]=12, e[2]=21, e[3]=22
  } mat2_t;

  // Runtime precision controls of every CORDIC unit.
  typedef struct packed {
    logic [1:0] iter_cyc;            // iteration cycles, 1..MAX_CYC
    logic [1:0] bypass;              // iterators bypassed in the last cycle
    logic [3:0] mask;                // LSBs zeroed before each micro-rotation
  } cordic_cfg_t;

  localparam scal_t ONE = scal_t'(1 <<< FRAC);

  // arctan(2**-i) as a fraction of a full turn, round(atan(2**-i)/(2*pi)*2**AW).
  function automatic ang_t atan_tab(input int i);
    case (i)
      0: return ang_t'(512);
      1: return ang_t'(302);
      2: return ang_t'(160);
      3: return ang_t'(81);
      4: return ang_t'(41);
      5: return ang_t'(20);
      6: return ang_t'(10);
      default: return ang_t'(5);
    endcase
  endfunction

  // CORDIC scale factor kappa(n) = prod_{i<n} cos(atan(2**-i)),
  // round(kappa(n) * 2**KFRAC) for n micro-rotations.
  function automatic logic [KFRAC:0] kappa_tab(input int n);
    case (n)
      1: return 15'd11585;
      2: return 15'd10362;
      3: return 15'd10053;
      4: return 15'd9975;
      5: return 15'd9956;
      6: return 15'd9951;
      7: return 15'd9950;
      default: return 15'd9949;
    endcase
  endfunction

  function automatic scal_t sat_scal(input logic signed [2*W+4:0] v);
    localparam logic signed [2*W+4:0] MAXV = (2*W+5)'((1 <<< (W-1)) - 1);
    localparam logic signed [2*W+4:0] MINV = -(2*W+5)'(1 <<< (W-1));
    if (v > MAXV)      return scal_t'(MAXV);
    else if (v < MINV) return scal_t'(MINV);
    else               return scal_t'(v);
  endfunction

  function automatic scal_t c2s(input cval_t v);   // CORDIC width -> scalar, saturating
    return sat_scal((2*W+5)'(v));
  endfunction

  function automatic cval_t s2c(input scal_t v);
    return cval_t'(v);
  endfunction

  function automatic cplx_t cneg(input cplx_t a);
    cplx_t r;
    r.re = -a.re;
    r.im = -a.im;
    return r;
  endfunction

endpackage
