// tb_jbuf: self-checking test of the double-banked transformation buffer
// (2 banks x 4 entries of 2x2 matrices). Random writes into one bank while
// the other is read, then the banks swap, like the controller uses it. A
// write must be visible from the next clock on, and writes to one bank must
// never disturb the other; every clock all four entries of the read bank
// are compared with a reference.
module tb_jbuf;
  import napsvd_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic we, wbank, rbank;
  logic [1:0] widx, ridx;
  mat2_t wdata, rdata;

  jbuf #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  mat2_t model [2][DEPTH];

  always @(posedge clk) if (rst_n && we) model[wbank][widx] = wdata;

  function automatic mat2_t rnd_m();
    mat2_t r;
    r = mat2_t'({$urandom, $urandom, $urandom, $urandom});
    return r;
  endfunction

  initial begin
    we = 1'b0; wbank = 1'b0; rbank = 1'b1; widx = '0; ridx = '0; wdata = '0;
    for (int b = 0; b < 2; b++) for (int i = 0; i < DEPTH; i++) model[b][i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 60; round++) begin
      // fill bank wbank (entries in random order, some rewritten)
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        for (int i = 0; i < DEPTH; i++) begin   // reads of the other bank
          ridx = 2'(i);
          #1;
          checks++;
          if (rdata !== model[rbank][i]) begin
            failures++;
            if (failures < 10) $display("FAIL round %0d bank %0d entry %0d", round, rbank, i);
          end
        end
        we = ($urandom % 5) != 0;
        widx = (k < DEPTH) ? 2'(k) : 2'($urandom);
        wdata = rnd_m();
      end
      @(negedge clk);
      we = 1'b0;
      // read back the filled bank one clock after the last write
      @(negedge clk);
      for (int i = 0; i < DEPTH; i++) begin
        rbank = wbank; ridx = 2'(i);
        #1;
        checks++;
        if (rdata !== model[wbank][i]) begin
          failures++;
          if (failures < 10) $display("FAIL readback round %0d entry %0d", round, i);
        end
      end
      wbank = ~wbank;
      rbank = ~wbank;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
