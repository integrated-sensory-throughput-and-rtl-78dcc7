// traffic_estimator: the load sensing part of the flexible priority
// resolver. It decides each cycle whether the router's arbiters use fixed
// or rotating priority.
//
// The load is the number of active requests at the router's inputs plus
// the number of neighbouring (previous) routers that report high load.
// When the load reaches THRESH the arbiters switch to rotating priority, to
// share the switch fairly; below it they use fixed priority, which is enough
// when little contends. The decision is registered, so the priorities are
// resolved one cycle before the grants that use them, and the same bit is
// sent to the neighbours as this router's load flag.
//
// Interface: req (one bit per input), prev_load (one bit per neighbour),
// rotate (registered mode), load (current unregistered load count).
// Choosing the mode from the input requests and the previous router's load
// follows the source article; the additive load count, the threshold and its
// default of 3 are this design's choices.
module traffic_estimator #(
  parameter int unsigned NREQ   = 5,
  parameter int unsigned NPREV  = 5,
  parameter int unsigned THRESH = 3
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NREQ-1:0]                req,
  input  logic [NPREV-1:0]               prev_load,
  output logic [$clog2(NREQ+NPREV+1)-1:0] load,
  output logic                           rotate
);
  localparam int unsigned LW = $clog2(NREQ + NPREV + 1);

  always_comb begin
    load = '0;
    for (int i = 0; i < NREQ; i++)  load += LW'(req[i]);
    for (int i = 0; i < NPREV; i++) load += LW'(prev_load[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rotate <= 1'b0;
    else        rotate <= (32'(load) >= THRESH);
  end
endmodule
