// jbuf: double-banked buffer of 2x2 matrices for one parallel-ordering
// permutation of one matrix (DEPTH = NMAX/2 entries per bank).
// The 2x2 SVD writes the J_l (or J_r, or the passed-through middle factor)
// of pair v into entry v of the fill bank while the multiplication engines
// read the other bank, so the multiplications for a matrix can start once
// all of its N/2 transformations exist. Write at the clock edge, read
// combinationally. Double banking is this design's choice for how the
// buffer lets filling and use overlap.
module jbuf
  import napsvd_pkg::*;
#(
  parameter int DEPTH = 4,
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic          wbank,
  input  logic [IW-1:0] widx,
  input  mat2_t         wdata,
  input  logic          rbank,
  input  logic [IW-1:0] ridx,
  output mat2_t         rdata
);

  mat2_t mem [2][DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < DEPTH; i++) mem[b][i] <= '0;
    end else if (we) begin
      mem[wbank][widx] <= wdata;
    end
  end

  assign rdata = mem[rbank][ridx];

endmodule
