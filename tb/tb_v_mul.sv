// tb_v_mul: self-checking test of the V multiplication engine.
// Random V block and J_r every clock; the result must equal the bit-exact
// rounded and saturated product exactly 3 clocks after the operands are
// presented, one result per clock.
module tb_v_mul;
  import napsvd_pkg::*;

  localparam int LAT = 3;
  localparam int NV  = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  `include "tb_fix_model.svh"

  mat2_t vblk, jr, res;
  v_mul dut (.clk, .rst_n, .vblk, .jr, .res);

  task automatic drive(input int t);
    vblk = rnd_mat(1 << FRAC);
    jr   = rnd_mat(1 << FRAC);
    expq[t] = ref_mul(vblk, jr);
  endtask

  mat2_t expq [NV + LAT + 1];
  int cyc = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NV + LAT; t++) begin
      @(negedge clk);
      // result of the operands presented LAT clocks earlier
      if (t >= LAT) begin
        checks++;
        if (res !== expq[t - LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL vector %0d (clock %0d)", t - LAT, t);
        end
      end
      if (t < NV) drive(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
