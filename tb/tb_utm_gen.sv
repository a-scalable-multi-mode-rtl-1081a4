// tb_utm_gen: self-checking test of the unitary transformation matrix
// generator, both the left (V_l) and the right (V_r) form. A new random
// (phi, ta, tb) every computational cycle; the matrix produced two cycles
// later is compared entry by entry with
//   V_l = [ c e^{j ta}  -s e^{j tb} ;  s e^{j ta}  c e^{j tb} ]
//   V_r = [ c e^{j ta}   s e^{j ta} ; -s e^{j tb}  c e^{j tb} ]
// (c = cos phi, s = sin phi), and must be unitary. The bound follows from
// six micro-rotations per CORDIC (angle error below 1.8 degrees per stage).
module tb_utm_gen;
  import napsvd_pkg::*;

  localparam int NT = 200;
  localparam real TOL = 0.05;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] ph;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0; else ph <= ph + 2'd1;

  cordic_cfg_t cfg;
  ang_t phi, ta, tb;
  mat2_t ml, mr;

  utm_gen #(.LEFT(1'b1)) u_l (.clk, .rst_n, .ph, .cfg, .phi, .ta, .tb, .m(ml));
  utm_gen #(.LEFT(1'b0)) u_r (.clk, .rst_n, .ph, .cfg, .phi, .ta, .tb, .m(mr));

  int checks = 0, failures = 0;
  `include "tb_cc_common.svh"

  ang_t hp [NT + 3], ha [NT + 3], hb [NT + 3];
  real max_e = 0.0;

  task automatic check_one(input int k);
    real c, s, er[4], ei[4], lr[4], li[4], rr[4], ri[4], e;
    real a, b;
    c = $cos(a2r(hp[k])); s = $sin(a2r(hp[k]));
    a = a2r(ha[k]); b = a2r(hb[k]);
    to_r(ml, lr, li);
    to_r(mr, rr, ri);
    // left form
    er[0] = c*$cos(a);  ei[0] = c*$sin(a);
    er[1] = -s*$cos(b); ei[1] = -s*$sin(b);
    er[2] = s*$cos(a);  ei[2] = s*$sin(a);
    er[3] = c*$cos(b);  ei[3] = c*$sin(b);
    for (int x = 0; x < 4; x++) begin
      e = cabs(lr[x] - er[x], li[x] - ei[x]);
      if (e > max_e) max_e = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("FAIL V_l entry %0d of input %0d: error %f", x, k, e);
      end
    end
    // right form
    er[1] = s*$cos(a);  ei[1] = s*$sin(a);
    er[2] = -s*$cos(b); ei[2] = -s*$sin(b);
    for (int x = 0; x < 4; x++) begin
      e = cabs(rr[x] - er[x], ri[x] - ei[x]);
      if (e > max_e) max_e = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("FAIL V_r entry %0d of input %0d: error %f", x, k, e);
      end
    end
    checks += 2;
    if (unit_err(lr, li) > 0.03) failures++;
    if (unit_err(rr, ri) > 0.03) failures++;
  endtask

  initial begin
    cfg = '{iter_cyc: 2'd3, bypass: 2'd0, mask: 4'd0};
    phi = '0; ta = '0; tb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NT + 2; k++) begin
      // start of computational cycle k
      @(negedge clk);
      while (ph != 2'd0) @(negedge clk);
      if (k >= 2) check_one(k - 2);   // result of the input two cycles back
      hp[k] = ang_t'($urandom); ha[k] = ang_t'($urandom); hb[k] = ang_t'($urandom);
      phi = hp[k]; ta = ha[k]; tb = hb[k];
    end
    $display("largest entry error %f", max_e);
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
