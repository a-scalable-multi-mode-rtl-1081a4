// napsvd_top: scalable, multi-mode SVD precoder based on the two-sided cyclic
// Jacobi method with parallel ordering.
//
// The only arithmetic is 2x2: a CORDIC-based 2x2 SVD generator (one SVD per
// 4 clocks) computes J_l and J_r for each index pair of the current
// parallel-ordering permutation, a Lambda engine (two cascaded 2x2
// multipliers) applies J_l * B * J_r to every 2x2 block B of Lambda, and a
// V engine (one 2x2 multiplier) accumulates V <- V * J_r. After the chosen
// number of sweeps the IO register file holds Lambda (nearly diagonal: the
// singular values on the diagonal) and the V register file the precoding
// matrix V, with M * V = U * Lambda for a unitary U.
//
// Use: while busy is low, load matrices with io_we/io_row/io_col/io_wdata
// (matrix slot m, entry (i,j) at row m*N+i, column j; entries should lie in
// [-1, 1) for head room), set cfg_* and pulse start. done pulses when all
// sweeps are finished; Lambda is then read through io_row/io_col/io_rdata and
// V(i,j) of slot m through v_row = m*N/2 + i/2, v_half = i%2, v_col = j.
// cfg_n is the matrix size (2, 4, 6 or 8), cfg_mi the number of interleaved
// matrices (MI*N <= 32; at least ceil((N+13)/(N/2)) avoids idle cycles),
// cfg_sweeps the number of sweeps and cfg_cordic the CORDIC precision
// (iteration cycles, bypassed iterators, masked LSBs).
// Register file sizes follow the 8x8 configuration: four 8x8 matrices in a
// 32 x 8 IO register file, the same capacity for V.
module napsvd_top
  import napsvd_pkg::*;
#(
  parameter int NMAX    = 8,
  parameter int IO_ROWS = 32,
  localparam int V_ROWS = IO_ROWS / 2,
  localparam int IW     = $clog2(NMAX),
  localparam int RW     = $clog2(IO_ROWS),
  localparam int VRW    = $clog2(V_ROWS),
  localparam int MW     = $clog2(IO_ROWS/2) + 1,
  localparam int PW     = (NMAX > 2) ? $clog2(NMAX/2) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW:0]   cfg_n,
  input  logic [MW-1:0] cfg_mi,
  input  logic [2:0]    cfg_sweeps,
  input  cordic_cfg_t   cfg_cordic,
  output logic          busy,
  output logic          done,
  // external access to the IO register file
  input  logic          io_we,
  input  logic [RW-1:0] io_row,
  input  logic [IW-1:0] io_col,
  input  cplx_t         io_wdata,
  output cplx_t         io_rdata,
  // external read of the V register file
  input  logic [VRW-1:0] v_row,
  input  logic          v_half,
  input  logic [IW-1:0] v_col,
  output cplx_t         v_rdata,
  // activity strobes
  output logic          evt_issue,
  output logic          evt_bubble,
  output logic          evt_mul,
  output logic          evt_perm,
  output logic          evt_sweep
);

  localparam int TAGW = 16;

  logic [1:0]      ph;
  logic            svd_valid_in, svd_valid_out;
  logic [TAGW-1:0] svd_tag_in, svd_tag_out;
  mat2_t           svd_m_in, svd_m_out, svd_jl, svd_jr;

  logic            jb_we, jb_wbank, jb_rbank, sel_diag;
  logic [PW-1:0]   jb_widx, jl_ridx, jr_ridx, dg_ridx;
  mat2_t           jl_rd, jr_rd, dg_rd;

  logic [RW-1:0]   io_rd_r0, io_rd_r1, io_wr_r0, io_wr_r1;
  logic [IW-1:0]   io_rd_c0, io_rd_c1, io_wr_c0, io_wr_c1;
  logic            io_wr_en;
  mat2_t           io_rd_data, lm_res;

  logic            v_init, v_wr_en;
  logic [2:0]      v_n2;
  logic [VRW-1:0]  v_rd_row, v_wr_row;
  logic [IW-1:0]   v_rd_c0, v_rd_c1, v_wr_c0, v_wr_c1;
  mat2_t           v_rd_data, vm_res;

  nxn_ctrl #(.NMAX(NMAX), .IO_ROWS(IO_ROWS), .V_ROWS(V_ROWS), .TAGW(TAGW)) u_ctrl (
    .clk, .rst_n, .start, .cfg_n, .cfg_mi, .cfg_sweeps,
    .ph, .busy, .done,
    .svd_valid_in, .svd_tag_in, .svd_valid_out, .svd_tag_out,
    .jb_we, .jb_wbank, .jb_widx, .jb_rbank, .jl_ridx, .jr_ridx, .dg_ridx, .sel_diag,
    .io_rd_r0, .io_rd_r1, .io_rd_c0, .io_rd_c1,
    .io_wr_en, .io_wr_r0, .io_wr_r1, .io_wr_c0, .io_wr_c1,
    .v_init, .v_n2, .v_rd_row, .v_rd_c0, .v_rd_c1,
    .v_wr_en, .v_wr_row, .v_wr_c0, .v_wr_c1,
    .evt_issue, .evt_bubble, .evt_mul, .evt_perm, .evt_sweep
  );

  io_regfile #(.ROWS(IO_ROWS), .COLS(NMAX)) u_io (
    .clk, .rst_n,
    .rd_r0(io_rd_r0), .rd_r1(io_rd_r1), .rd_c0(io_rd_c0), .rd_c1(io_rd_c1),
    .rd_data(io_rd_data),
    .wr_en(io_wr_en), .wr_r0(io_wr_r0), .wr_r1(io_wr_r1),
    .wr_c0(io_wr_c0), .wr_c1(io_wr_c1), .wr_data(lm_res),
    .ext_we(io_we && !busy), .ext_row(io_row), .ext_col(io_col),
    .ext_wdata(io_wdata), .ext_rdata(io_rdata)
  );

  assign svd_m_in = io_rd_data;

  svd2x2 #(.TAGW(TAGW)) u_svd (
    .clk, .rst_n, .ph, .cfg(cfg_cordic),
    .valid_in(svd_valid_in), .tag_in(svd_tag_in), .m_in(svd_m_in),
    .valid_out(svd_valid_out), .tag_out(svd_tag_out), .m_out(svd_m_out),
    .jl(svd_jl), .jr(svd_jr)
  );

  jbuf #(.DEPTH(NMAX/2)) u_jl_buf (
    .clk, .rst_n, .we(jb_we), .wbank(jb_wbank), .widx(jb_widx), .wdata(svd_jl),
    .rbank(jb_rbank), .ridx(jl_ridx), .rdata(jl_rd)
  );
  jbuf #(.DEPTH(NMAX/2)) u_jr_buf (
    .clk, .rst_n, .we(jb_we), .wbank(jb_wbank), .widx(jb_widx), .wdata(svd_jr),
    .rbank(jb_rbank), .ridx(jr_ridx), .rdata(jr_rd)
  );
  jbuf #(.DEPTH(NMAX/2)) u_mid_buf (
    .clk, .rst_n, .we(jb_we), .wbank(jb_wbank), .widx(jb_widx), .wdata(svd_m_out),
    .rbank(jb_rbank), .ridx(dg_ridx), .rdata(dg_rd)
  );

  lambda_mul u_lmul (
    .clk, .rst_n, .jl(jl_rd), .blk(sel_diag ? dg_rd : io_rd_data), .jr(jr_rd),
    .res(lm_res)
  );

  v_regfile #(.ROWS(V_ROWS), .COLS(NMAX)) u_vreg (
    .clk, .rst_n, .init(v_init), .n2(v_n2),
    .rd_row(v_rd_row), .rd_c0(v_rd_c0), .rd_c1(v_rd_c1), .rd_data(v_rd_data),
    .wr_en(v_wr_en), .wr_row(v_wr_row), .wr_c0(v_wr_c0), .wr_c1(v_wr_c1),
    .wr_data(vm_res),
    .ext_row(v_row), .ext_half(v_half), .ext_col(v_col), .ext_rdata(v_rdata)
  );

  v_mul u_vmul (
    .clk, .rst_n, .vblk(v_rd_data), .jr(jr_rd), .res(vm_res)
  );

endmodule
