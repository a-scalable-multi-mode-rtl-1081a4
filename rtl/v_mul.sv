// v_mul: V multiplication engine. Computes V_blk * J_r for a 2x2 block of the
// precoding matrix (two consecutive rows, the two columns of a pair), one per
// clock, with a single pipelined 2x2 multiplier behind an operand register.
// Latency: operands presented in clock t, result valid in clock t+3.
module v_mul
  import napsvd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mat2_t vblk,
  input  mat2_t jr,
  output mat2_t res
);

  mat2_t v_q, jr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0; jr_q <= '0;
    end else begin
      v_q  <= vblk;
      jr_q <= jr;
    end
  end

  mmu2x2 u_m (.clk, .rst_n, .a(v_q), .b(jr_q), .p(res));

endmodule
