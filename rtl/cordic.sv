// cordic: multi-cycle CORDIC unit in vectoring or rotation mode.
//
// One operation takes one computational cycle of CS = 4 clocks and reuses the
// same CHAIN micro-rotation iterators, as in the CORDIC template of the
// design: a preprocessing step folds the input into the first quadrant, the
// iterator chain runs for up to MAX_CYC clocks with its output fed back, and
// a postprocessing step scales x and y by kappa.
//   phase 0 : st <= IT(prep(x_in, y_in, z_in))     micro-rotations 0..CHAIN-1
//   phase 1 : st <= IT(st)   if cfg.iter_cyc >= 2  micro-rotations CHAIN..
//   phase 2 : st <= IT(st)   if cfg.iter_cyc >= 3
//   phase 3 : out <= post(st)
// The inputs must be stable during phase 0; the outputs change at the end of
// phase 3 and hold for the whole next computational cycle.
// Runtime precision (design's three knobs): cfg.iter_cyc iteration cycles,
// cfg.bypass iterators skipped at the end of the last cycle (so the number of
// micro-rotations is iter_cyc*CHAIN-bypass), and cfg.mask LSBs zeroed before
// every micro-rotation and before postprocessing. Iteration cycles that are
// not used hold their register.
// Vectoring (VEC=1): sigma = -sign(y); x_out = |v| (times 1/kappa when
// POST=0), z_out = angle of the input vector. Rotation (VEC=0): sigma =
// sign(z); (x_out, y_out) = input vector rotated by z_in.
// The rotation preprocessing rotates by +k*pi/2 and subtracts k*pi/2 from the
// angle; this is the mathematically consistent form of the rotation-mode
// quadrant table (this design's own reading, see README).
// Inside, x and y carry GF = 8 extra fraction bits, and results are rounded
// to nearest on output (avoids a systematic shrink of unitary matrices over
// many sweeps; the design's own choice).
// CHAIN = 2 and MAX_CYC = 3 (six micro-rotations at most, the largest count
// needed) are this design's choice.
module cordic
  import napsvd_pkg::*;
#(
  parameter bit VEC  = 1'b1,    // 1: vectoring, 0: rotation
  parameter bit POST = 1'b1     // 1: apply kappa in postprocessing
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ph,       // phase within the computational cycle
  input  cordic_cfg_t cfg,
  input  cval_t       x_in,
  input  cval_t       y_in,
  input  ang_t        z_in,
  output cval_t       x_out,
  output cval_t       y_out,
  output ang_t        z_out
);

  // Internal datapath: CW bits plus GF guard fraction bits; results are
  // rounded back to the CW-bit format.
  localparam int GF = 8;
  localparam int IW = CW + GF;
  typedef logic signed [IW-1:0] ival_t;

  typedef struct packed {
    ival_t x;
    ival_t y;
    ang_t  z;
  } cst_t;

  ival_t xi, yi;
  assign xi = ival_t'(x_in) <<< GF;
  assign yi = ival_t'(y_in) <<< GF;

  cst_t st, pre, it_in, it_out;
  int   n_micro;

  always_comb begin
    n_micro = int'(cfg.iter_cyc) * CHAIN - int'(cfg.bypass);
    if (n_micro < 1) n_micro = 1;
  end

  // Quadrant preprocessing.
  always_comb begin
    pre = '0;
    if (VEC) begin
      unique case ({xi[IW-1], yi[IW-1]})
        2'b00: pre = '{x: xi,  y: yi,  z: ang_t'(0)};
        2'b10: pre = '{x: yi,  y: -xi, z: ang_t'(1 << (AW-2))};
        2'b11: pre = '{x: -xi, y: -yi, z: ang_t'(2 << (AW-2))};
        default: pre = '{x: -yi, y: xi, z: ang_t'(3 << (AW-2))};
      endcase
    end else begin
      unique case (z_in[AW-1:AW-2])
        2'd0: pre = '{x: xi,  y: yi,  z: z_in};
        2'd1: pre = '{x: -yi, y: xi,  z: z_in - ang_t'(1 << (AW-2))};
        2'd2: pre = '{x: -xi, y: -yi, z: z_in - ang_t'(2 << (AW-2))};
        default: pre = '{x: yi, y: -xi, z: z_in - ang_t'(3 << (AW-2))};
      endcase
    end
  end

  // Zero the m LSBs of the scalar format (and the guard bits below them).
  function automatic ival_t lsb_mask(input ival_t v, input logic [3:0] m);
    ival_t k;
    k = (m == 4'd0) ? '1 : ~ival_t'((1 << (int'(m) + GF)) - 1);
    return v & k;
  endfunction

  function automatic cval_t rnd(input ival_t v);
    ival_t r;
    r = (v + ival_t'(1 << (GF-1))) >>> GF;
    return cval_t'(r);
  endfunction

  // Iterator chain: CHAIN micro-rotations of eq. (9), starting at index base.
  function automatic cst_t iterate(input cst_t s, input int base, input int nmax,
                                   input logic [3:0] m);
    cst_t  r;
    ival_t xs, ys;
    logic  pos;
    int    i;
    r = s;
    for (int k = 0; k < CHAIN; k++) begin
      i = base + k;
      if (i < nmax) begin
        r.x = lsb_mask(r.x, m);
        r.y = lsb_mask(r.y, m);
        xs  = r.x >>> i;
        ys  = r.y >>> i;
        // pos: sigma = +1
        pos = VEC ? r.y[IW-1] : ~r.z[AW-1];
        if (pos) begin
          r.x = r.x - ys;
          r.y = r.y + xs;
          r.z = r.z - atan_tab(i);
        end else begin
          r.x = r.x + ys;
          r.y = r.y - xs;
          r.z = r.z + atan_tab(i);
        end
      end
    end
    return r;
  endfunction

  always_comb begin
    it_in  = (ph == 2'd0) ? pre : st;
    it_out = iterate(it_in, int'(ph) * CHAIN, n_micro, cfg.mask);
  end

  function automatic ival_t post_scale(input ival_t v, input int n, input logic [3:0] m);
    logic signed [IW+KFRAC+1:0] p;
    p = (IW+KFRAC+2)'(lsb_mask(v, m)) * $signed({1'b0, kappa_tab(n)});
    p = p + (IW+KFRAC+2)'(1 << (KFRAC-1));
    return ival_t'(p >>> KFRAC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= '0;
      x_out <= '0;
      y_out <= '0;
      z_out <= '0;
    end else begin
      unique case (ph)
        2'd0: st <= it_out;
        2'd1: if (cfg.iter_cyc >= 2'd2) st <= it_out;
        2'd2: if (cfg.iter_cyc >= 2'd3) st <= it_out;
        default: begin
          x_out <= rnd(POST ? post_scale(st.x, n_micro, cfg.mask) : lsb_mask(st.x, cfg.mask));
          y_out <= rnd(POST ? post_scale(st.y, n_micro, cfg.mask) : lsb_mask(st.y, cfg.mask));
          z_out <= st.z;
        end
      endcase
    end
  end

endmodule
