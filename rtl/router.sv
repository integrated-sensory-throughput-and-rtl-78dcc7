// router: five-port virtual-channel router with the flexible-priority
// arbiter, one per node of the mesh.
//
// Flits arrive on the north, south, east, west and local links and are
// stored per virtual channel (input_port). A packet's head flit is routed
// (XY routing), wins an output VC in the VC allocator, and then each of its
// flits competes in the switch allocator; a winner passes the crossbar in
// the same cycle and is registered onto the output link (output_port). Flow
// control is credit based: a router sends a flit only when the next
// router's buffer for that VC has room, and returns a credit for every flit
// that leaves its own buffers.
//
// The traffic estimator counts the input ports that hold requests and the
// neighbours that report high load. From that count it chooses, one cycle
// ahead, fixed priority (light traffic) or rotating priority (heavy
// traffic) for every arbiter of the VC and switch allocators, and reports
// its own choice to the neighbours through load_out.
//
// Timing: a head flit entering in cycle t leaves on the output link in t+4
// at the earliest (buffer write, routing, VC allocation, switch allocation
// and traversal, link register); each following flit of the packet can
// leave one cycle after the previous one. Reset is active low and
// synchronous. Port numbering is N, S, E, W, local. The stages, the buffers
// per port, the crossbar and the traffic-dependent choice of priority
// follow the source article; pipeline depth and flow control are this design's.
module router
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC      = 4,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned MY_X        = 0,
  parameter int unsigned MY_Y        = 0,
  parameter int unsigned LOAD_THRESH = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  link_t                in_link   [NUM_PORTS],
  output credit_t              credit_out[NUM_PORTS],
  output link_t                out_link  [NUM_PORTS],
  input  credit_t              credit_in [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] load_in,
  output logic                 load_out,
  output router_stat_t         stat
);
  localparam int unsigned P = NUM_PORTS;
  localparam int unsigned V = NUM_VC;

  logic [V-1:0]          va_req   [P];
  port_e                 route    [P][V];
  logic [V-1:0]          va_gnt   [P];
  logic [VC_IDX_W-1:0]   va_vc    [P][V];
  logic [V-1:0]          sa_req   [P];
  logic [V-1:0]          sa_ready [P];
  flit_t                 front    [P][V];
  logic [VC_IDX_W-1:0]   outvc    [P][V];

  logic [V-1:0]          vc_free  [P];
  logic [V-1:0]          credit_ok[P];
  logic [V-1:0]          alloc    [P];

  logic [P-1:0]          in_gnt, out_en, s1_any;
  logic [VC_IDX_W-1:0]   in_vc    [P];
  logic [$clog2(P)-1:0]  out_sel  [P];
  link_t                 xin      [P];
  link_t                 xout     [P];

  logic                  rotate;
  logic [P-1:0]          port_busy;
  logic [$clog2(2*P+1)-1:0] load;

  for (genvar p = 0; p < P; p++) begin : g_port
    input_port #(.NUM_VC(V), .DEPTH(BUF_DEPTH), .MY_X(MY_X), .MY_Y(MY_Y)) u_in (
      .clk, .rst_n,
      .in_link    (in_link[p]),
      .credit_out (credit_out[p]),
      .va_req     (va_req[p]),
      .route      (route[p]),
      .va_gnt     (va_gnt[p]),
      .va_vc      (va_vc[p]),
      .sa_req     (sa_req[p]),
      .sa_gnt     (in_gnt[p]),
      .sa_vc      (in_vc[p]),
      .front      (front[p]),
      .outvc      (outvc[p])
    );

    output_port #(.NUM_VC(V), .DEPTH(BUF_DEPTH)) u_out (
      .clk, .rst_n,
      .alloc     (alloc[p]),
      .xbar_in   (xout[p]),
      .credit_in (credit_in[p]),
      .vc_free   (vc_free[p]),
      .credit_ok (credit_ok[p]),
      .link_out  (out_link[p])
    );

    // A VC may compete for the switch only with a credit for its output VC.
    for (genvar v = 0; v < V; v++) begin : g_rdy
      assign sa_ready[p][v] = sa_req[p][v] && credit_ok[route[p][v]][outvc[p][v]];
    end

    assign xin[p] = '{valid: in_gnt[p],
                      vc:    outvc[p][in_vc[p]],
                      flit:  front[p][in_vc[p]]};

    assign port_busy[p] = |sa_req[p] || |va_req[p];
  end

  traffic_estimator #(.NREQ(P), .NPREV(P), .THRESH(LOAD_THRESH)) u_est (
    .clk, .rst_n, .req (port_busy), .prev_load (load_in), .load, .rotate
  );
  assign load_out = rotate;

  vc_allocator #(.P(P), .V(V)) u_va (
    .clk, .rst_n, .rotate,
    .req (va_req), .route, .free (vc_free),
    .gnt (va_gnt), .gnt_vc (va_vc), .alloc
  );

  switch_allocator #(.P(P), .V(V)) u_sa (
    .clk, .rst_n, .rotate,
    .req (sa_ready), .route,
    .in_gnt, .in_vc, .out_en, .out_sel, .s1_any
  );

  crossbar #(.P(P)) u_xbar (
    .in_link (xin), .sel (out_sel), .en (out_en), .out_link (xout)
  );

  always_comb begin
    stat = '0;
    stat.rotate = rotate;
    for (int p = 0; p < P; p++) begin
      if (s1_any[p] && !in_gnt[p]) stat.sa_conflict = 1'b1;
      if ((va_req[p] & ~va_gnt[p]) != '0) stat.va_conflict = 1'b1;
      if ((sa_req[p] & ~sa_ready[p]) != '0) stat.credit_stall = 1'b1;
    end
  end
endmodule
