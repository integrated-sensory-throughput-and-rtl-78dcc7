// fp_arbiter: N:1 arbiter built from a ring of priority cells whose priority
// vector comes from a flexible priority resolver.
//
// The resolver holds a one-hot priority token. In fixed mode (rotate = 0)
// the token given to the cells is always cell 0, so the lowest index wins.
// In rotating mode the stored token is used and, whenever the grant is
// accepted (upd = 1), moves on by the source article's rule
//   PR*_n = GT_(n-1) + PR_n & Kin_n
// that is, to the cell after the winner, or stays put when no cell asked.
// The stored token is frozen while the arbiter is in fixed mode, so
// rotation resumes where it stopped.
//
// The ring of cells is unrolled into two passes so that the carry never
// loops back combinationally: the first pass starts at cell 0 with no
// carry, the second pass takes the carry out of the first and has no token.
// A cell's grant is the OR of its two passes. The carry that reaches the
// token's cell in the second pass is the Kin_n of the update rule.
//
// Timing: grant is combinational from req and rotate; the token updates on
// the rising clock edge. Reset (active low, synchronous) puts the token on
// cell 0. Cells of the source article's arbiter, the resolver choice between
// fixed and rotating priority and the update rule follow the source article; the
// unrolled ring, the upd input and freezing the token in fixed mode are
// this design's choices.
module fp_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rotate,   // 1: rotating priority, 0: fixed priority
  input  logic         upd,      // grant taken: advance the token
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic         any_gnt
);
  logic [N-1:0] pr_q, pr_eff, pr_next;
  logic [N-1:0] g1, g2, k1, k2;
  logic [N:0]   c1, c2;

  assign pr_eff = rotate ? pr_q : N'(1);

  assign c1[0] = 1'b0;
  assign c2[0] = c1[N];

  for (genvar i = 0; i < N; i++) begin : g_ring
    prio_cell u_first (
      .req (req[i]), .pr (pr_eff[i]), .kin (c1[i]), .gnt (g1[i]), .kout (k1[i])
    );
    prio_cell u_second (
      .req (req[i]), .pr (1'b0), .kin (c2[i]), .gnt (g2[i]), .kout (k2[i])
    );
    assign c1[i+1] = k1[i];
    assign c2[i+1] = k2[i];
  end

  assign gnt     = g1 | g2;
  assign any_gnt = |gnt;

  // PR*_n = GT_(n-1) + PR_n & Kin_n, with Kin_n the carry around the ring.
  for (genvar i = 0; i < N; i++) begin : g_next
    assign pr_next[i] = gnt[(i + N - 1) % N] | (pr_eff[i] & c2[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)               pr_q <= N'(1);
    else if (rotate && upd && any_gnt) pr_q <= pr_next;
  end

  // At most one grant, and only to a requester.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
  assert property (@(posedge clk) disable iff (!rst_n) (|req) == any_gnt);
endmodule
