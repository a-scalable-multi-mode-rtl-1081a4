// svd2x2: 2x2 complex SVD generator. Starts one SVD every computational
// cycle (CS = 4 clocks) and returns J_l = V_l2 V_l1 and J_r = V_r1 V_r2 such
// that J_l * M * J_r is real diagonal.
// It is Q1 followed by Q2 with one shared pipelined 2x2 multiplier (MMU, two
// clocks latency). Within computational cycle j the MMU computes, one
// product per clock:
//   phase 0: T   = (V_l1 M) V_r1     for the SVD that entered Q1 in cycle j-4
//   phase 1: P   = V_l1 M            for the SVD that entered Q1 in cycle j-3,
//                                     held in a register until the next cycle
//   phase 2: J_l = V_l2 V_l1         for the SVD that entered Q2 in cycle j-4
//   phase 3: J_r = V_r1 V_r2         for the same SVD
// Precomputing V_l1 M one cycle early is what lets T finish inside one
// computational cycle despite the two-clock multiplier.
// Interface: m_in, tag_in and valid_in are sampled at the end of phase 3 (the
// input pipeline register). jl, jr, m_out (the input matrix, passed through
// for use as the middle factor), tag_out and valid_out then appear LAT = 12
// computational cycles later and are stable for a whole computational cycle.
// The output register stage that realigns J_l and J_r to a whole cycle is
// this design's choice.
// Timing: inputs sampled at the end of computational cycle c give outputs that
// are valid during the whole of cycle c+12.
module svd2x2
  import napsvd_pkg::*;
#(
  parameter int TAGW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      ph,
  input  cordic_cfg_t     cfg,
  input  logic            valid_in,
  input  logic [TAGW-1:0] tag_in,
  input  mat2_t           m_in,
  output logic            valid_out,
  output logic [TAGW-1:0] tag_out,
  output mat2_t           m_out,
  output mat2_t           jl,
  output mat2_t           jr
);

  localparam int LAT = 12;   // computational cycles from sampling to output

  mat2_t m_reg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          m_reg <= '0;
    else if (ph == 2'd3) m_reg <= m_in;
  end

  mat2_t vl1_early, m_dly, vl1, vr1;
  q1_unit u_q1 (
    .clk, .rst_n, .ph, .cfg,
    .m_in(m_reg), .vl1_early, .m_dly, .vl1, .vr1
  );

  mat2_t t_reg, p_reg, vl2, vr2, vl1_d, vr1_d;
  q2_unit u_q2 (
    .clk, .rst_n, .ph, .cfg,
    .t_in(t_reg), .vl1_in(vl1), .vr1_in(vr1),
    .vl2, .vr2, .vl1_out(vl1_d), .vr1_out(vr1_d)
  );

  // Shared MMU, operands selected by phase (eq. (21) schedule).
  mat2_t ma, mb, mp;
  always_comb begin
    unique case (ph)
      2'd0: begin ma = p_reg;     mb = vr1;   end
      2'd1: begin ma = vl1_early; mb = m_dly; end
      2'd2: begin ma = vl2;       mb = vl1_d; end
      default: begin ma = vr1_d;  mb = vr2;   end
    endcase
  end

  mmu2x2 u_mmu (.clk, .rst_n, .a(ma), .b(mb), .p(mp));

  // Result capture: the product of phase x is in mp during phase x+2.
  mat2_t jl_q, jr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_reg <= '0;
      p_reg <= '0;
      jl_q  <= '0;
      jr_q  <= '0;
      jl    <= '0;
      jr    <= '0;
    end else begin
      unique case (ph)
        2'd2: t_reg <= mp;            // T from phase 0
        2'd3: begin
          p_reg <= mp;                // V_l1 M from phase 1
          jl    <= jl_q;
          jr    <= jr_q;
        end
        2'd0: jl_q <= mp;             // J_l from phase 2 of the last cycle
        default: jr_q <= mp;          // J_r from phase 3 of the last cycle
      endcase
    end
  end

  // Tag, valid and input matrix travel alongside (the middle-factor FIFO).
  logic            v_sr [LAT];
  logic [TAGW-1:0] t_sr [LAT];
  mat2_t           m_sr [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v_sr[i] <= 1'b0;
        t_sr[i] <= '0;
        m_sr[i] <= '0;
      end
    end else if (ph == 2'd3) begin
      v_sr[0] <= valid_in;
      t_sr[0] <= tag_in;
      m_sr[0] <= m_in;
      for (int i = 1; i < LAT; i++) begin
        v_sr[i] <= v_sr[i-1];
        t_sr[i] <= t_sr[i-1];
        m_sr[i] <= m_sr[i-1];
      end
    end
  end
  assign valid_out = v_sr[LAT-1];
  assign tag_out   = t_sr[LAT-1];
  assign m_out     = m_sr[LAT-1];

endmodule
