// nxn_ctrl: control flow and address generation of the N x N SVD.
//
// Runs the parallel-ordering two-sided Jacobi algorithm on MI interleaved
// matrices held in the IO register file. Nested control loops, innermost
// first:
//   serial access   : pair v = 0..N/2-1 of the current permutation, one 2x2
//                     SVD issued per computational cycle (4 clocks);
//   matrix access   : matrix slot m = 0..MI-1, same permutation;
//   parallel access : permutation 0..N-2 from the pair generator;
//   sweep control   : sweep 0..SWEEPS-1, then back to the idle (IO) state.
// A round is one permutation applied to all MI matrices and lasts
// R = max(MI*N/2, RMIN) computational cycles, RMIN = N + 13: a matrix may
// only be read again once its last Lambda block of the previous permutation
// is written back. Cycles of a round beyond MI*N/2 are bubbles (no SVD
// issued); with enough interleaved matrices there are none.
//
// Phase plan of a computational cycle (ph = 0..3):
//   ph 3    : IO-SVD AGU reads Lambda^(p_v,q_v) of the issued job (2x2 port);
//   ph 0..2 : IO-Lambda-mul AGU reads the off-diagonal blocks; the diagonal
//             block (v = u) comes from the middle-factor buffer in ph 3, so
//             a single 2x2 read port serves both users.
// When the 2x2 SVD returns the last pair of a matrix, the multiplication
// engines process that matrix during the next N/2 computational cycles,
// block (v, u) with u = v+1+ph (mod N/2) in ph 0..N/2-2 and u = v in ph 3,
// which covers all (N/2)^2 blocks. The V engine works in lock step on row
// pair v and column pair u. Read addresses of both engines go through delay
// lines (the address FIFOs) and are reused as write-back addresses.
// The round length, bubbles, the phase plan and the block order are this
// design's choices; the loop structure, the single 2x2 ports and the
// address FIFOs follow the design.
module nxn_ctrl
  import napsvd_pkg::*;
#(
  parameter int NMAX = 8,
  parameter int IO_ROWS = 32,
  parameter int V_ROWS = 16,
  parameter int TAGW = 16,
  localparam int IW  = $clog2(NMAX),
  localparam int PW  = (NMAX > 2) ? $clog2(NMAX/2) : 1,
  localparam int RW  = $clog2(IO_ROWS),
  localparam int VRW = $clog2(V_ROWS),
  localparam int MW  = $clog2(IO_ROWS/2) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IW:0]     cfg_n,
  input  logic [MW-1:0]   cfg_mi,
  input  logic [2:0]      cfg_sweeps,
  output logic [1:0]      ph,
  output logic            busy,
  output logic            done,
  // 2x2 SVD
  output logic            svd_valid_in,
  output logic [TAGW-1:0] svd_tag_in,
  input  logic            svd_valid_out,
  input  logic [TAGW-1:0] svd_tag_out,
  // J buffers (J_l, J_r, middle factor share the controls)
  output logic            jb_we,
  output logic            jb_wbank,
  output logic [PW-1:0]   jb_widx,
  output logic            jb_rbank,
  output logic [PW-1:0]   jl_ridx,
  output logic [PW-1:0]   jr_ridx,
  output logic [PW-1:0]   dg_ridx,
  output logic            sel_diag,
  // IO register file 2x2 ports
  output logic [RW-1:0]   io_rd_r0, io_rd_r1,
  output logic [IW-1:0]   io_rd_c0, io_rd_c1,
  output logic            io_wr_en,
  output logic [RW-1:0]   io_wr_r0, io_wr_r1,
  output logic [IW-1:0]   io_wr_c0, io_wr_c1,
  // V register file
  output logic            v_init,
  output logic [2:0]      v_n2,
  output logic [VRW-1:0]  v_rd_row,
  output logic [IW-1:0]   v_rd_c0, v_rd_c1,
  output logic            v_wr_en,
  output logic [VRW-1:0]  v_wr_row,
  output logic [IW-1:0]   v_wr_c0, v_wr_c1,
  // event strobes for monitoring
  output logic            evt_issue,
  output logic            evt_bubble,
  output logic            evt_mul,
  output logic            evt_perm,
  output logic            evt_sweep
);

  localparam int LM_LAT = 5;   // lambda_mul latency
  localparam int VM_LAT = 3;   // v_mul latency

  typedef struct packed {
    logic          last;
    logic [3:0]    m;
    logic [PW-1:0] v;
    logic [IW-1:0] p;
    logic [IW-1:0] q;
  } tag_t;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  // latched configuration
  logic [IW:0]   n_q;
  logic [2:0]    n2_q;
  logic [MW-1:0] mi_q;
  logic [2:0]    sw_q;
  int            jobs, rmin, rlen;

  always_comb begin
    jobs = int'(mi_q) * int'(n2_q);
    rmin = 2 * int'(n2_q) + 13;
    rlen = (jobs > rmin) ? jobs : rmin;
  end

  // phase counter
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0; else ph <= ph + 2'd1;

  // parallel ordering pairs
  logic [IW-1:0] pp [NMAX/2];
  logic [IW-1:0] qq [NMAX/2];
  logic          pg_load, pg_adv;

  pair_gen #(.NMAX(NMAX)) u_pg (
    .clk, .rst_n, .n(n_q), .load(pg_load), .adv(pg_adv), .p(pp), .q(qq)
  );

  // issue counters
  int            slot, perm, sweep, drain;
  logic [3:0]    m_c;
  logic [PW-1:0] v_c;
  logic          issuing;

  assign issuing = (state == S_RUN) && (slot < jobs);

  always_comb begin
    tag_t t;
    t.last = (int'(v_c) == int'(n2_q) - 1);
    t.m    = m_c;
    t.v    = v_c;
    t.p    = pp[v_c];
    t.q    = qq[v_c];
    svd_tag_in   = TAGW'(t);
    svd_valid_in = issuing;
  end

  logic last_round;
  assign last_round = (perm == int'(n_q) - 2) && (sweep == int'(sw_q) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n_q <= (IW+1)'(2); n2_q <= 3'd1; mi_q <= '0; sw_q <= 3'd1;
      slot <= 0; perm <= 0; sweep <= 0; drain <= 0;
      m_c <= '0; v_c <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_q   <= cfg_n;
          n2_q  <= 3'(cfg_n >> 1);
          mi_q  <= cfg_mi;
          sw_q  <= cfg_sweeps;
          slot  <= 0; perm <= 0; sweep <= 0;
          m_c   <= '0; v_c <= '0;
          state <= S_RUN;
        end
        S_RUN: if (ph == 2'd3) begin
          if (issuing) begin
            if (int'(v_c) == int'(n2_q) - 1) begin
              v_c <= '0;
              m_c <= m_c + 4'd1;
            end else begin
              v_c <= v_c + 1'b1;
            end
          end
          if (slot == rlen - 1) begin
            slot <= 0;
            m_c  <= '0;
            v_c  <= '0;
            if (last_round) begin
              state <= S_DRAIN;
              drain <= 0;
            end else if (perm == int'(n_q) - 2) begin
              perm  <= 0;
              sweep <= sweep + 1;
            end else begin
              perm <= perm + 1;
            end
          end else begin
            slot <= slot + 1;
          end
        end
        default: if (ph == 2'd3) begin    // S_DRAIN
          if (drain == rmin) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            drain <= drain + 1;
          end
        end
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign pg_load = (state == S_IDLE) && start;
  assign v_init  = (state == S_IDLE) && start;
  assign v_n2    = 3'(cfg_n >> 1);
  assign pg_adv  = (state == S_RUN) && (ph == 2'd3) && (slot == rlen - 1);

  assign evt_issue  = (state == S_RUN) && (ph == 2'd3) && issuing;
  assign evt_bubble = (state == S_RUN) && (ph == 2'd3) && !issuing;
  assign evt_perm   = pg_adv;
  assign evt_sweep  = pg_adv && (perm == int'(n_q) - 2);

  // ---------------------------------------------------------------------
  // J buffer fill: the SVD result is stable for a whole computational
  // cycle; it is written at the end of phase 3.
  tag_t          to;
  logic          fill_bank;
  logic [IW-1:0] pq_p [2][NMAX/2];
  logic [IW-1:0] pq_q [2][NMAX/2];

  assign to       = tag_t'(svd_tag_out[$bits(tag_t)-1:0]);
  assign jb_we    = svd_valid_out && (ph == 2'd3);
  assign jb_wbank = fill_bank;
  assign jb_widx  = to.v;

  logic          lm_go;          // start the engines for the group just filled
  logic          lm_act;
  logic          lm_bank;
  logic [3:0]    lm_m;
  logic [PW-1:0] lm_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_bank <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < NMAX/2; i++) begin
          pq_p[b][i] <= '0;
          pq_q[b][i] <= '0;
        end
    end else if (start && state == S_IDLE) begin
      fill_bank <= 1'b0;
    end else if (jb_we) begin
      pq_p[fill_bank][to.v] <= to.p;
      pq_q[fill_bank][to.v] <= to.q;
      if (to.last) fill_bank <= ~fill_bank;
    end
  end

  assign lm_go = jb_we && to.last;

  // engine sequencing: N/2 computational cycles per matrix
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lm_act  <= 1'b0;
      lm_bank <= 1'b0;
      lm_m    <= '0;
      lm_v    <= '0;
    end else if (lm_go) begin
      lm_act  <= 1'b1;
      lm_bank <= fill_bank;
      lm_m    <= to.m;
      lm_v    <= '0;
    end else if (lm_act && ph == 2'd3) begin
      if (int'(lm_v) == int'(n2_q) - 1) lm_act <= 1'b0;
      else                              lm_v <= lm_v + 1'b1;
    end
  end

  // slot decode for the current clock
  logic          sl_valid, sl_diag;
  logic [PW-1:0] sl_u;
  always_comb begin
    int x;
    sl_valid = 1'b0;
    sl_diag  = 1'b0;
    sl_u     = lm_v;
    x        = int'(lm_v) + 1 + int'(ph);
    if (x >= int'(n2_q)) x = x - int'(n2_q);
    if (lm_act) begin
      if (ph == 2'd3) begin
        sl_valid = 1'b1;
        sl_diag  = 1'b1;
      end else if (int'(ph) <= int'(n2_q) - 2) begin
        sl_valid = 1'b1;
        sl_u     = PW'(x);
      end
    end
  end

  assign evt_mul  = sl_valid;
  assign jb_rbank = lm_bank;
  assign jl_ridx  = lm_v;
  assign jr_ridx  = sl_u;
  assign dg_ridx  = lm_v;
  assign sel_diag = sl_diag;

  // block addresses of the slot
  logic [RW-1:0] base_row;
  logic [RW-1:0] sl_r0, sl_r1;
  logic [IW-1:0] sl_c0, sl_c1;
  always_comb begin
    base_row = RW'(int'(lm_m) * int'(n_q));
    sl_r0    = base_row + RW'(pq_p[lm_bank][lm_v]);
    sl_r1    = base_row + RW'(pq_q[lm_bank][lm_v]);
    sl_c0    = pq_p[lm_bank][sl_u];
    sl_c1    = pq_q[lm_bank][sl_u];
  end

  // IO read port: SVD issue in phase 3, Lambda engine otherwise
  always_comb begin
    logic [RW-1:0] ib;
    ib = RW'(int'(m_c) * int'(n_q));
    if (ph == 2'd3) begin
      io_rd_r0 = ib + RW'(pp[v_c]);
      io_rd_r1 = ib + RW'(qq[v_c]);
      io_rd_c0 = pp[v_c];
      io_rd_c1 = qq[v_c];
    end else begin
      io_rd_r0 = sl_r0;
      io_rd_r1 = sl_r1;
      io_rd_c0 = sl_c0;
      io_rd_c1 = sl_c1;
    end
  end

  // V read port: row pair lm_v of matrix lm_m, columns of pair u
  assign v_rd_row = VRW'(int'(lm_m) * int'(n2_q) + int'(lm_v));
  assign v_rd_c0  = sl_c0;
  assign v_rd_c1  = sl_c1;

  // address FIFOs for write back
  typedef struct packed {
    logic          en;
    logic [RW-1:0] r0, r1;
    logic [IW-1:0] c0, c1;
  } io_wa_t;
  typedef struct packed {
    logic           en;
    logic [VRW-1:0] row;
    logic [IW-1:0]  c0, c1;
  } v_wa_t;

  io_wa_t io_fifo [LM_LAT];
  v_wa_t  v_fifo  [VM_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LM_LAT; i++) io_fifo[i] <= '0;
      for (int i = 0; i < VM_LAT; i++) v_fifo[i]  <= '0;
    end else begin
      io_fifo[0] <= '{en: sl_valid, r0: sl_r0, r1: sl_r1, c0: sl_c0, c1: sl_c1};
      for (int i = 1; i < LM_LAT; i++) io_fifo[i] <= io_fifo[i-1];
      v_fifo[0]  <= '{en: sl_valid, row: v_rd_row, c0: sl_c0, c1: sl_c1};
      for (int i = 1; i < VM_LAT; i++) v_fifo[i] <= v_fifo[i-1];
    end
  end

  // lambda_mul presents its result LM_LAT clocks after the slot: the FIFO
  // entry that entered LM_LAT clocks ago is at index LM_LAT-1.
  assign io_wr_en = io_fifo[LM_LAT-1].en;
  assign io_wr_r0 = io_fifo[LM_LAT-1].r0;
  assign io_wr_r1 = io_fifo[LM_LAT-1].r1;
  assign io_wr_c0 = io_fifo[LM_LAT-1].c0;
  assign io_wr_c1 = io_fifo[LM_LAT-1].c1;
  assign v_wr_en  = v_fifo[VM_LAT-1].en;
  assign v_wr_row = v_fifo[VM_LAT-1].row;
  assign v_wr_c0  = v_fifo[VM_LAT-1].c0;
  assign v_wr_c1  = v_fifo[VM_LAT-1].c1;

endmodule
