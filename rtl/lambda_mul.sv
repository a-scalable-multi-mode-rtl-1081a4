// lambda_mul: Lambda multiplication engine. Computes the three-factor product
// J_l * B * J_r of a 2x2 block B of Lambda, one per clock, with two cascaded
// pipelined 2x2 multipliers (the second takes the first one's result as its
// left operand). The operands are registered on entry (the pipeline register
// behind the register-file multiplexers), J_r is delayed to meet the first
// product. Latency: operands presented in clock t, result valid in clock t+5.
module lambda_mul
  import napsvd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mat2_t jl,
  input  mat2_t blk,
  input  mat2_t jr,
  output mat2_t res
);

  mat2_t jl_q, blk_q, jr_q, jr_d1, jr_d2, p1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jl_q <= '0; blk_q <= '0; jr_q <= '0; jr_d1 <= '0; jr_d2 <= '0;
    end else begin
      jl_q  <= jl;
      blk_q <= blk;
      jr_q  <= jr;
      jr_d1 <= jr_q;
      jr_d2 <= jr_d1;
    end
  end

  mmu2x2 u_m1 (.clk, .rst_n, .a(jl_q), .b(blk_q), .p(p1));
  mmu2x2 u_m2 (.clk, .rst_n, .a(p1),   .b(jr_d2), .p(res));

endmodule
