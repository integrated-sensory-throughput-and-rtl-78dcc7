// vc_allocator: two-stage separable virtual-channel allocator (VA).
//
// Stage 1: every input VC waiting for allocation has a V:1 arbiter that
// picks one free VC of the output port its packet is routed to. Stage 2:
// every output VC has a (P*V):1 arbiter that picks one of the input VCs
// whose stage-1 choice it is. An input VC is granted when it wins stage 2,
// and it learns the number of its output VC; the output port marks that VC
// busy the same cycle. All arbiters are flexible-priority ring arbiters
// (fp_arbiter) driven by the router's fixed/rotating mode. A stage-1
// arbiter advances its token only when its input VC is granted, so a loser
// keeps its choice.
//
// Combinational from inputs to grants; arbiter tokens update on the clock.
// The two stages of V:1 and PiV:1 arbiters follow the source article's VC
// allocation figure; the use of the flexible arbiter in both stages and the
// token-update rule are this design's choices.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rotate,
  input  logic [V-1:0]        req    [P],      // input VC waits for an output VC
  input  port_e               route  [P][V],   // its output port
  input  logic [V-1:0]        free   [P],      // free VCs per output port
  output logic [V-1:0]        gnt    [P],
  output logic [VC_IDX_W-1:0] gnt_vc [P][V],
  output logic [V-1:0]        alloc  [P]       // output VCs taken per output port
);
  localparam int unsigned PV = P * V;

  logic [V-1:0]  s1_req [P][V];
  logic [V-1:0]  s1_gnt [P][V];
  logic [PV-1:0] s2_req [P][V];
  logic [PV-1:0] s2_gnt [P][V];

  // Stage 1: one V:1 arbiter per input VC over the free VCs of its port.
  for (genvar p = 0; p < P; p++) begin : g_in
    for (genvar v = 0; v < V; v++) begin : g_ivc
      logic unused_any;
      assign s1_req[p][v] = req[p][v] ? free[route[p][v]] : '0;
      fp_arbiter #(.N(V)) u_s1 (
        .clk, .rst_n, .rotate, .upd (gnt[p][v]),
        .req (s1_req[p][v]), .gnt (s1_gnt[p][v]), .any_gnt (unused_any)
      );
    end
  end

  // Stage 2: one (P*V):1 arbiter per output VC.
  for (genvar o = 0; o < P; o++) begin : g_out
    for (genvar w = 0; w < V; w++) begin : g_ovc
      for (genvar p = 0; p < P; p++) begin : g_src
        for (genvar v = 0; v < V; v++) begin : g_svc
          assign s2_req[o][w][p*V+v] =
            req[p][v] && 32'(route[p][v]) == o && s1_gnt[p][v][w];
        end
      end
      fp_arbiter #(.N(PV)) u_s2 (
        .clk, .rst_n, .rotate, .upd (1'b1),
        .req (s2_req[o][w]), .gnt (s2_gnt[o][w]), .any_gnt (alloc[o][w])
      );
    end
  end

  // An input VC is granted when the output VC it chose in stage 1 picks it.
  for (genvar p = 0; p < P; p++) begin : g_gnt
    for (genvar v = 0; v < V; v++) begin : g_gvc
      always_comb begin
        gnt_vc[p][v] = '0;
        for (int w = 0; w < V; w++) if (s1_gnt[p][v][w]) gnt_vc[p][v] = VC_IDX_W'(w);
        gnt[p][v] = req[p][v] && (s1_gnt[p][v] != '0) &&
                    s2_gnt[route[p][v]][gnt_vc[p][v][$clog2(V)-1:0]][p*V+v];
      end
    end
  end
endmodule
