// switch_allocator: two-stage separable switch allocator (SA) with flexible
// prioritisation.
//
// Stage 1: each input port has a V:1 flexible ring arbiter (fp_arbiter)
// that picks one of its VCs ready to send, and a V:1 multiplexer that
// passes on the output port that VC wants. Stage 2: each output port has a
// P:1 matrix arbiter (fp_matrix_arbiter) over the input ports whose
// stage-1 winners want it. The router's traffic estimator sets both stages
// to fixed or rotating priority. A stage-1 arbiter advances only when its
// input port also wins stage 2. Every input port is granted at most once
// and every output port at most once, so no flit is sent twice.
//
// Outputs: in_gnt / in_vc per input port (which VC sends), out_en / out_sel
// per output port (crossbar setting). Combinational from inputs; arbiter
// state updates on the clock. The two stages, the V:1 multiplexers and the
// flexible prioritisation of both stages follow the source article's switch
// allocator figure; the matrix arbiter for the second stage follows its
// description of input ports contending for one output port.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rotate,
  input  logic [V-1:0]          req     [P],
  input  port_e                 route   [P][V],
  output logic [P-1:0]          in_gnt,
  output logic [VC_IDX_W-1:0]   in_vc   [P],
  output logic [P-1:0]          out_en,
  output logic [$clog2(P)-1:0]  out_sel [P],
  output logic [P-1:0]          s1_any          // input port has a request
);
  logic [V-1:0] s1_gnt  [P];
  port_e        s1_port [P];
  logic [P-1:0] s2_req  [P];
  logic [P-1:0] s2_gnt  [P];

  for (genvar p = 0; p < P; p++) begin : g_in
    fp_arbiter #(.N(V)) u_s1 (
      .clk, .rst_n, .rotate, .upd (in_gnt[p]),
      .req (req[p]), .gnt (s1_gnt[p]), .any_gnt (s1_any[p])
    );
    always_comb begin
      s1_port[p] = PORT_L;
      in_vc[p]   = '0;
      for (int v = 0; v < V; v++) begin
        if (s1_gnt[p][v]) begin
          s1_port[p] = route[p][v];
          in_vc[p]   = VC_IDX_W'(v);
        end
      end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    for (genvar p = 0; p < P; p++) begin : g_src
      assign s2_req[o][p] = s1_any[p] && 32'(s1_port[p]) == o;
    end
    fp_matrix_arbiter #(.K(P)) u_s2 (
      .clk, .rst_n, .rotate, .upd (1'b1),
      .req (s2_req[o]), .gnt (s2_gnt[o]), .any_gnt (out_en[o])
    );
    always_comb begin
      out_sel[o] = '0;
      for (int p = 0; p < P; p++) if (s2_gnt[o][p]) out_sel[o] = $clog2(P)'(p);
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      in_gnt[p] = 1'b0;
      for (int o = 0; o < P; o++) in_gnt[p] |= s2_gnt[o][p];
    end
  end
endmodule
