// v_regfile: register file for the precoding matrices V.
// Each of its ROWS rows holds two consecutive rows of one V matrix
// (2*COLS complex scalars), so a single row address selects V rows 2v and
// 2v+1 and two column indices pick columns c0 and c1 of both:
//   rd_data = [ V(2v,c0) V(2v,c1) ; V(2v+1,c0) V(2v+1,c1) ].
// For a matrix size N, slot m uses rows m*N/2 .. m*N/2+N/2-1.
// Writes pass a pipeline register in front of the storage, like the IO
// register file. init loads the identity into every slot for the given
// n2 = N/2 (row r holds V rows 2*(r mod n2) and 2*(r mod n2)+1); ROWS = 16 is
// derived from the same 256-scalar capacity as the IO register file.
// The external scalar read port (ext_row, ext_half, ext_col) is this design's
// choice.
module v_regfile
  import napsvd_pkg::*;
#(
  parameter int ROWS = 16,
  parameter int COLS = 8,
  localparam int RW = $clog2(ROWS),
  localparam int CWI = $clog2(COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic [2:0]     n2,
  input  logic [RW-1:0]  rd_row,
  input  logic [CWI-1:0] rd_c0, rd_c1,
  output mat2_t          rd_data,
  input  logic           wr_en,
  input  logic [RW-1:0]  wr_row,
  input  logic [CWI-1:0] wr_c0, wr_c1,
  input  mat2_t          wr_data,
  input  logic [RW-1:0]  ext_row,
  input  logic           ext_half,
  input  logic [CWI-1:0] ext_col,
  output cplx_t          ext_rdata
);

  cplx_t mem [ROWS][2][COLS];

  logic           w_en_q;
  logic [RW-1:0]  w_row_q;
  logic [CWI-1:0] w_c0_q, w_c1_q;
  mat2_t          w_d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_en_q <= 1'b0;
      w_row_q <= '0; w_c0_q <= '0; w_c1_q <= '0;
      w_d_q <= '0;
    end else begin
      w_en_q  <= wr_en;
      w_row_q <= wr_row;
      w_c0_q  <= wr_c0;
      w_c1_q  <= wr_c1;
      w_d_q   <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int h = 0; h < 2; h++)
          for (int c = 0; c < COLS; c++) mem[r][h][c] <= '0;
    end else if (init) begin
      for (int r = 0; r < ROWS; r++)
        for (int h = 0; h < 2; h++)
          for (int c = 0; c < COLS; c++)
            mem[r][h][c] <= (n2 != 3'd0 && 2 * (r % int'(n2)) + h == c)
                            ? '{re: ONE, im: '0} : '0;
    end else if (w_en_q) begin
      mem[w_row_q][0][w_c0_q] <= w_d_q.e[0];
      mem[w_row_q][0][w_c1_q] <= w_d_q.e[1];
      mem[w_row_q][1][w_c0_q] <= w_d_q.e[2];
      mem[w_row_q][1][w_c1_q] <= w_d_q.e[3];
    end
  end

  always_comb begin
    rd_data.e[0] = mem[rd_row][0][rd_c0];
    rd_data.e[1] = mem[rd_row][0][rd_c1];
    rd_data.e[2] = mem[rd_row][1][rd_c0];
    rd_data.e[3] = mem[rd_row][1][rd_c1];
    ext_rdata    = mem[ext_row][ext_half][ext_col];
  end

endmodule
