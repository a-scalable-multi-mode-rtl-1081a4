// tb_mmu2x2: self-checking test of the pipelined 2x2 complex multiplier.
// A new random operand pair every clock; each product is compared bit-exactly
// with a rounding/saturating reference exactly 2 clocks later, which checks
// the latency and the one-product-per-clock throughput. The first half of the
// vectors stays in range, the second half is full scale (saturation).
module tb_mmu2x2;
  import napsvd_pkg::*;

  localparam int LAT = 2;
  localparam int NV  = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  `include "tb_fix_model.svh"

  mat2_t a, b, res;
  mmu2x2 dut (.clk, .rst_n, .a, .b, .p(res));

  // Operands: the first half within the unit-matrix range (no overflow),
  // the second half full-scale, so saturation is exercised too.
  task automatic drive(input int t);
    int rg;
    rg = (t < NV / 2) ? (1 << FRAC) : (1 << (W - 1));
    a = rnd_mat(rg);
    b = rnd_mat(rg);
    expq[t] = ref_mul(a, b);
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
