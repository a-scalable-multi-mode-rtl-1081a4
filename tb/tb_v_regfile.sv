// tb_v_regfile: self-checking test of the V register file (16 rows, each two
// V rows of 8 complex scalars).
//   1. init for N = 8, 6, 4 and 2 must load the identity into every matrix
//      slot (row r holds V rows 2*(r mod N/2) and 2*(r mod N/2)+1), checked
//      over the scalar read port;
//   2. random 2x2 writes back to back with random 2x2 and scalar reads every
//      clock, against a reference that applies each write one clock after it
//      is presented (the write pipeline register).
module tb_v_regfile;
  import napsvd_pkg::*;

  localparam int ROWS = 16, COLS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic init, wr_en, ext_half;
  logic [2:0] n2;
  logic [3:0] rd_row, wr_row, ext_row;
  logic [2:0] rd_c0, rd_c1, wr_c0, wr_c1, ext_col;
  mat2_t rd_data, wr_data;
  cplx_t ext_rdata;

  v_regfile #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  cplx_t model [ROWS][2][COLS];

  logic p_en = 1'b0;
  logic [3:0] p_row;
  logic [2:0] p_c0, p_c1;
  mat2_t p_d;
  always @(posedge clk) if (rst_n) begin
    if (init) begin
      for (int r = 0; r < ROWS; r++)
        for (int h = 0; h < 2; h++)
          for (int c = 0; c < COLS; c++)
            model[r][h][c] = (2 * (r % int'(n2)) + h == c) ? '{re: ONE, im: '0} : '0;
    end else if (p_en) begin
      model[p_row][0][p_c0] = p_d.e[0]; model[p_row][0][p_c1] = p_d.e[1];
      model[p_row][1][p_c0] = p_d.e[2]; model[p_row][1][p_c1] = p_d.e[3];
    end
    p_en = wr_en; p_row = wr_row; p_c0 = wr_c0; p_c1 = wr_c1; p_d = wr_data;
  end

  task automatic compare(input string what);
    mat2_t e;
    e.e[0] = model[rd_row][0][rd_c0]; e.e[1] = model[rd_row][0][rd_c1];
    e.e[2] = model[rd_row][1][rd_c0]; e.e[3] = model[rd_row][1][rd_c1];
    checks += 2;
    if (rd_data !== e) begin
      failures++;
      if (failures < 10) $display("FAIL 2x2 read %s row %0d cols %0d,%0d", what, rd_row, rd_c0, rd_c1);
    end
    if (ext_rdata !== model[ext_row][ext_half][ext_col]) begin
      failures++;
      if (failures < 10) $display("FAIL scalar read %s (%0d,%0d,%0d)", what, ext_row, ext_half, ext_col);
    end
  endtask

  initial begin
    init = 1'b0; wr_en = 1'b0; n2 = 3'd4;
    {rd_row, wr_row, ext_row, rd_c0, rd_c1, wr_c0, wr_c1, ext_col, ext_half} = '0;
    wr_data = '0;
    for (int r = 0; r < ROWS; r++) for (int h = 0; h < 2; h++) for (int c = 0; c < COLS; c++)
      model[r][h][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int nn = 4; nn >= 1; nn--) begin
      // scribble, then init must restore the identity
      for (int k = 0; k < 20; k++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_row = 4'($urandom); wr_c0 = 3'($urandom); wr_c1 = 3'(wr_c0 + 1);
        wr_data = mat2_t'({$urandom, $urandom, $urandom, $urandom});
      end
      @(negedge clk);
      wr_en = 1'b0;
      @(negedge clk);
      init = 1'b1; n2 = 3'(nn);
      @(negedge clk);
      init = 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int h = 0; h < 2; h++)
          for (int c = 0; c < COLS; c++) begin
            cplx_t want;
            ext_row = 4'(r); ext_half = 1'(h); ext_col = 3'(c);
            want = (2 * (r % nn) + h == c) ? '{re: ONE, im: '0} : '0;
            #1;
            checks++;
            if (ext_rdata !== want) begin
              failures++;
              if (failures < 10) $display("FAIL identity N=%0d at (%0d,%0d,%0d)", 2 * nn, r, h, c);
            end
          end
    end
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      compare("random");
      wr_en = ($urandom % 4) != 0;
      wr_row = 4'($urandom);
      wr_c0 = 3'($urandom); wr_c1 = 3'(wr_c0 + 1 + $urandom % (COLS - 1));
      wr_data = mat2_t'({$urandom, $urandom, $urandom, $urandom});
      if (k % 2 == 0) begin
        rd_row = p_row; rd_c0 = p_c0; rd_c1 = p_c1;
      end else begin
        rd_row = 4'($urandom); rd_c0 = 3'($urandom); rd_c1 = 3'($urandom);
      end
      ext_row = 4'($urandom); ext_half = 1'($urandom); ext_col = 3'($urandom);
      #1 compare("random");
    end
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
