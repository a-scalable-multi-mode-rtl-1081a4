// pair_gen: parallel-ordering pair generator.
// A bank of NMAX registers is loaded with 0..NMAX-1 and, on each advance,
// permuted by a fixed mesh, so that reading it as (r0,r1), (r2,r3), ... gives
// N/2 disjoint index pairs and N-1 advances visit every pair once (round-robin
// order: register 0 stays, the others move one step along the ring
// 1 -> 2 -> 4 -> ... -> N-2 -> N-1 -> N-3 -> ... -> 3 -> 1). For N = 8 this
// reproduces the published sequence (1,2)(3,4)(5,6)(7,8), (1,4)(2,6)(3,8)(5,7),
// ... in 1-based numbering. A runtime size n < NMAX excludes the registers
// n..NMAX-1 from the mesh. Each output pair is ordered so that p < q.
// Indices here are 0-based.
// Interface: load re-initialises the bank, adv moves to the next permutation;
// both act at the clock edge. p[v], q[v] are combinational from the bank.
module pair_gen #(
  parameter int NMAX = 8,
  localparam int IW = $clog2(NMAX)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [IW:0]        n,       // active size, even, 2..NMAX
  input  logic               load,
  input  logic               adv,
  output logic [IW-1:0]      p [NMAX/2],
  output logic [IW-1:0]      q [NMAX/2]
);

  logic [IW-1:0] bank [NMAX];
  logic [IW-1:0] nxt  [NMAX];

  // Source register of each position in the next permutation for size n.
  always_comb begin
    for (int i = 0; i < NMAX; i++) begin
      if (i == 0 || i >= int'(n))          nxt[i] = bank[i];
      else if (i == 1)                    nxt[i] = (int'(n) > 2) ? bank[3] : bank[1];
      else if (i == int'(n) - 1)          nxt[i] = bank[i-1];   // top row end drops down
      else if (i % 2 == 0)                nxt[i] = bank[(i == 2) ? 1 : i-2];
      else                                nxt[i] = bank[i+2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NMAX; i++) bank[i] <= IW'(i);
    end else if (load) begin
      for (int i = 0; i < NMAX; i++) bank[i] <= IW'(i);
    end else if (adv) begin
      bank <= nxt;
    end
  end

  always_comb begin
    for (int v = 0; v < NMAX/2; v++) begin
      if (bank[2*v] < bank[2*v+1]) begin
        p[v] = bank[2*v];
        q[v] = bank[2*v+1];
      end else begin
        p[v] = bank[2*v+1];
        q[v] = bank[2*v];
      end
    end
  end

endmodule
