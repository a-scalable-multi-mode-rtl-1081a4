// io_regfile: IO register file holding the matrices being decomposed
// (M on input, Lambda on output). ROWS x COLS complex scalars; a matrix of
// size N with slot index m occupies rows m*N .. m*N+N-1 and columns 0..N-1,
// so 32 x 8 holds four 8x8, five 6x6, eight 4x4 or sixteen 2x2 matrices.
// Internal access is by 2x2 submatrix: two row indices and two column indices
// select [ (r0,c0) (r0,c1) ; (r1,c0) (r1,c1) ] for reading (combinational)
// and for writing. A write first enters a pipeline register in front of the
// demultiplexer and reaches the storage one clock later, as in the design;
// the read side is registered by the consumers.
// A second, scalar port (ext_*) gives outside access for loading inputs and
// reading results; the external write shares the pipeline register and must
// not coincide with an internal write (the controller only allows it while
// idle). The separate scalar read port is this design's choice.
module io_regfile
  import napsvd_pkg::*;
#(
  parameter int ROWS = 32,
  parameter int COLS = 8,
  localparam int RW = $clog2(ROWS),
  localparam int CWI = $clog2(COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // 2x2 read port
  input  logic [RW-1:0]  rd_r0, rd_r1,
  input  logic [CWI-1:0] rd_c0, rd_c1,
  output mat2_t          rd_data,
  // 2x2 write port
  input  logic           wr_en,
  input  logic [RW-1:0]  wr_r0, wr_r1,
  input  logic [CWI-1:0] wr_c0, wr_c1,
  input  mat2_t          wr_data,
  // external scalar access
  input  logic           ext_we,
  input  logic [RW-1:0]  ext_row,
  input  logic [CWI-1:0] ext_col,
  input  cplx_t          ext_wdata,
  output cplx_t          ext_rdata
);

  cplx_t mem [ROWS][COLS];

  // input pipeline register
  logic           w_en_q, x_en_q;
  logic [RW-1:0]  w_r0_q, w_r1_q;
  logic [CWI-1:0] w_c0_q, w_c1_q;
  mat2_t          w_d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_en_q <= 1'b0;
      x_en_q <= 1'b0;
      w_r0_q <= '0; w_r1_q <= '0; w_c0_q <= '0; w_c1_q <= '0;
      w_d_q  <= '0;
    end else begin
      w_en_q <= wr_en;
      x_en_q <= ext_we && !wr_en;
      if (wr_en) begin
        w_r0_q <= wr_r0; w_r1_q <= wr_r1; w_c0_q <= wr_c0; w_c1_q <= wr_c1;
        w_d_q  <= wr_data;
      end else begin
        w_r0_q <= ext_row; w_r1_q <= ext_row; w_c0_q <= ext_col; w_c1_q <= ext_col;
        w_d_q  <= '0;
        w_d_q.e[0] <= ext_wdata;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) mem[r][c] <= '0;
    end else if (w_en_q) begin
      mem[w_r0_q][w_c0_q] <= w_d_q.e[0];
      mem[w_r0_q][w_c1_q] <= w_d_q.e[1];
      mem[w_r1_q][w_c0_q] <= w_d_q.e[2];
      mem[w_r1_q][w_c1_q] <= w_d_q.e[3];
    end else if (x_en_q) begin
      mem[w_r0_q][w_c0_q] <= w_d_q.e[0];
    end
  end

  always_comb begin
    rd_data.e[0] = mem[rd_r0][rd_c0];
    rd_data.e[1] = mem[rd_r0][rd_c1];
    rd_data.e[2] = mem[rd_r1][rd_c0];
    rd_data.e[3] = mem[rd_r1][rd_c1];
    ext_rdata    = mem[ext_row][ext_col];
  end

endmodule
