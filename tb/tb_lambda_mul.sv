// tb_lambda_mul: self-checking test of the Lambda multiplication engine.
// Random J_l, Lambda block and J_r every clock; the result must equal the
// bit-exact reference (J_l * B, rounded and saturated, then times J_r)
// exactly 5 clocks after the operands are presented, one result per clock.
module tb_lambda_mul;
  import napsvd_pkg::*;

  localparam int LAT = 5;
  localparam int NV  = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  `include "tb_fix_model.svh"

  mat2_t jl, blk, jr, res;
  lambda_mul dut (.clk, .rst_n, .jl, .blk, .jr, .res);

  // J_l and J_r with entries up to 1, Lambda blocks up to 2.
  task automatic drive(input int t);
    jl  = rnd_mat(1 << FRAC);
    jr  = rnd_mat(1 << FRAC);
    blk = rnd_mat(2 << FRAC);
    expq[t] = ref_mul(ref_mul(jl, blk), jr);
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
