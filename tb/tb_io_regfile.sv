// tb_io_regfile: self-checking test of the IO register file (32 x 8 complex
// scalars). A reference array is updated one clock after each write, which is
// the latency of the write pipeline register, and every clock the 2x2 read
// port and the scalar read port are compared with it.
//   1. every location is written through the external scalar port;
//   2. random 2x2 writes (rows r0 != r1, columns c0 != c1) back to back, with
//      random 2x2 and scalar reads in every clock, including reads of a
//      location in the clock right after it was written (must still be old);
//   3. an external write presented together with an internal write is
//      ignored (the internal write has priority).
module tb_io_regfile;
  import napsvd_pkg::*;

  localparam int ROWS = 32, COLS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] rd_r0, rd_r1, wr_r0, wr_r1, ext_row;
  logic [2:0] rd_c0, rd_c1, wr_c0, wr_c1, ext_col;
  logic wr_en, ext_we;
  mat2_t rd_data, wr_data;
  cplx_t ext_wdata, ext_rdata;

  io_regfile #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  cplx_t model [ROWS][COLS];

  // reference: writes land one clock after they are presented
  logic p_en = 1'b0, p_x = 1'b0;
  logic [4:0] p_r0, p_r1;
  logic [2:0] p_c0, p_c1;
  mat2_t p_d;
  always @(posedge clk) if (rst_n) begin
    if (p_en) begin
      model[p_r0][p_c0] = p_d.e[0]; model[p_r0][p_c1] = p_d.e[1];
      model[p_r1][p_c0] = p_d.e[2]; model[p_r1][p_c1] = p_d.e[3];
    end else if (p_x) model[p_r0][p_c0] = p_d.e[0];
    p_en = wr_en; p_x = ext_we && !wr_en;
    p_r0 = wr_en ? wr_r0 : ext_row; p_r1 = wr_r1;
    p_c0 = wr_en ? wr_c0 : ext_col; p_c1 = wr_c1;
    p_d = wr_data;
    if (!wr_en) p_d.e[0] = ext_wdata;
  end

  function automatic cplx_t rnd_c();
    return '{re: scal_t'($urandom), im: scal_t'($urandom)};
  endfunction

  task automatic compare(input string what);
    mat2_t e;
    e.e[0] = model[rd_r0][rd_c0]; e.e[1] = model[rd_r0][rd_c1];
    e.e[2] = model[rd_r1][rd_c0]; e.e[3] = model[rd_r1][rd_c1];
    checks += 2;
    if (rd_data !== e) begin
      failures++;
      if (failures < 10) $display("FAIL 2x2 read %s rows %0d,%0d cols %0d,%0d", what, rd_r0, rd_r1, rd_c0, rd_c1);
    end
    if (ext_rdata !== model[ext_row][ext_col]) begin
      failures++;
      if (failures < 10) $display("FAIL scalar read %s (%0d,%0d)", what, ext_row, ext_col);
    end
  endtask

  initial begin
    wr_en = 1'b0; ext_we = 1'b0;
    {rd_r0, rd_r1, wr_r0, wr_r1, ext_row, rd_c0, rd_c1, wr_c0, wr_c1, ext_col} = '0;
    wr_data = '0; ext_wdata = '0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) model[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 1. external load of every location
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        ext_we = 1'b1; ext_row = 5'(r); ext_col = 3'(c); ext_wdata = rnd_c();
      end
    @(negedge clk);
    ext_we = 1'b0;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        ext_row = 5'(r); ext_col = 3'(c);
        rd_r0 = 5'(r); rd_r1 = 5'((r + 1) % ROWS); rd_c0 = 3'(c); rd_c1 = 3'((c + 3) % COLS);
        #1 compare("after load");
      end
    // 2. random 2x2 writes with reads in every clock
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      compare("random");
      wr_en = ($urandom % 4) != 0;
      wr_r0 = 5'($urandom); wr_r1 = 5'(wr_r0 + 1 + $urandom % (ROWS - 1));
      wr_c0 = 3'($urandom); wr_c1 = 3'(wr_c0 + 1 + $urandom % (COLS - 1));
      wr_data.e = {rnd_c(), rnd_c(), rnd_c(), rnd_c()};
      ext_we = ($urandom % 3) == 0;        // 3. ignored when wr_en is set
      ext_wdata = rnd_c();
      if (k % 2 == 0) begin                // read what was written last clock
        rd_r0 = p_r0; rd_r1 = p_r1; rd_c0 = p_c0; rd_c1 = p_c1;
      end else begin
        rd_r0 = 5'($urandom); rd_r1 = 5'($urandom); rd_c0 = 3'($urandom); rd_c1 = 3'($urandom);
      end
      ext_row = 5'($urandom); ext_col = 3'($urandom);
      #1 compare("random");
    end
    @(negedge clk);
    wr_en = 1'b0; ext_we = 1'b0;
    repeat (2) @(negedge clk);
    compare("final");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
