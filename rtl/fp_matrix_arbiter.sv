// fp_matrix_arbiter: K:1 matrix arbiter with flexible (fixed or rotating)
// priority, used where the input ports contend for one output port.
//
// The priority state is the upper triangle of a K x K matrix: bit w[i][j]
// (i < j) set means requester i goes before requester j; the lower triangle
// is its complement and is not stored, so the state is K(K-1)/2 flip-flops.
// Requester i wins when it requests and no other requester that goes before
// it also requests. After a grant in rotating mode the winner's row is
// cleared and its column set, so the winner drops to the lowest priority
// for the next round (least recently served). In fixed mode the arbiter
// uses the reset matrix (all upper bits set: the lowest index wins) and the
// stored matrix is left as it is.
//
// Timing: grant is combinational from req and rotate; the matrix updates on
// the rising clock edge when upd is high. Reset (active low, synchronous)
// loads the fixed order. The triangular matrix, the highest-priority grant
// and the row/column update follow the source article; the fixed order used in
// fixed mode and the upd input are this design's choices.
module fp_matrix_arbiter #(
  parameter int unsigned K = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rotate,
  input  logic         upd,
  input  logic [K-1:0] req,
  output logic [K-1:0] gnt,
  output logic         any_gnt
);
  // w_q[i][j] is meaningful for i < j only.
  logic [K-1:0][K-1:0] w_q;
  logic [K-1:0][K-1:0] beats;   // beats[j][i]: j goes before i

  always_comb begin
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K; j++) begin
        if (j < i)      beats[j][i] = rotate ? w_q[j][i]  : 1'b1;
        else if (j > i) beats[j][i] = rotate ? ~w_q[i][j] : 1'b0;
        else            beats[j][i] = 1'b0;
      end
    end
    for (int i = 0; i < K; i++) begin
      logic blocked;
      blocked = 1'b0;
      for (int j = 0; j < K; j++) blocked |= req[j] & beats[j][i];
      gnt[i] = req[i] & ~blocked;
    end
  end

  assign any_gnt = |gnt;

  for (genvar i = 0; i < K; i++) begin : g_row
    for (genvar j = 0; j < K; j++) begin : g_col
      if (i < j) begin : g_bit
        always_ff @(posedge clk) begin
          if (!rst_n)                     w_q[i][j] <= 1'b1;
          else if (rotate && upd && gnt[i]) w_q[i][j] <= 1'b0;   // winner's row
          else if (rotate && upd && gnt[j]) w_q[i][j] <= 1'b1;   // winner's column
        end
      end else begin : g_none
        assign w_q[i][j] = 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (|req) == any_gnt);
endmodule
