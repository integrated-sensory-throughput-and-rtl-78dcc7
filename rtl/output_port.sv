// output_port: state of one output port of the router and its link
// register (link traversal).
//
// For each virtual channel of the next router's input buffer it keeps a
// busy bit (the VC has been allocated to a packet whose tail has not yet
// left) and a credit counter (free words in that buffer). The VC allocator
// sets busy bits through alloc; a flit leaving through the crossbar takes
// one credit and, if it is a tail, frees the VC; a credit returned from
// downstream adds one. The flit from the crossbar is registered before it
// drives the link, so a flit granted in cycle t is on the link in cycle
// t+1. Reset (active low, synchronous) frees all VCs and fills the credit
// counters with DEPTH. The source article draws the credit path of the router;
// credit-based flow control with one credit per buffer word is this
// design's choice.
module output_port
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 4,
  parameter int unsigned DEPTH  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] alloc,      // VCs allocated this cycle
  input  link_t             xbar_in,    // flit leaving through the switch
  input  credit_t           credit_in,  // credit from the next router
  output logic [NUM_VC-1:0] vc_free,
  output logic [NUM_VC-1:0] credit_ok,
  output link_t             link_out
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [NUM_VC-1:0] busy_q;
  logic [CW-1:0]     cred_q [NUM_VC];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic sent, back;
    assign sent = xbar_in.valid && 32'(xbar_in.vc) == v;
    assign back = credit_in.valid && 32'(credit_in.vc) == v;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        busy_q[v] <= 1'b0;
        cred_q[v] <= CW'(DEPTH);
      end else begin
        if (alloc[v])                          busy_q[v] <= 1'b1;
        else if (sent && is_tail(xbar_in.flit)) busy_q[v] <= 1'b0;
        cred_q[v] <= cred_q[v] - CW'(sent) + CW'(back);
      end
    end

    assign vc_free[v]   = ~busy_q[v];
    assign credit_ok[v] = (cred_q[v] != '0);

    assert property (@(posedge clk) disable iff (!rst_n) !(sent && cred_q[v] == '0));
    assert property (@(posedge clk) disable iff (!rst_n) !(alloc[v] && busy_q[v]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) link_out <= '0;
    else        link_out <= xbar_in;
  end
endmodule
