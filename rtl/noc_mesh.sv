// noc_mesh: the network-on-chip: a MESH_X x MESH_Y two-dimensional mesh of
// flexible-priority routers, each with one core attached through a network
// interface. The default is the 3 x 3 mesh of the evaluated network.
//
// Node n = y * MESH_X + x sits in column x and row y; row 0 is the northern
// edge. Neighbouring routers are joined by a link and a credit return in
// each direction, and each router tells its four neighbours whether it runs
// in rotating (high load) priority, which they count as load from the
// previous router. Link inputs at the mesh edge are tied off; XY routing
// never sends a flit towards them.
//
// Per node the cores see the network interface's packet streams:
// tx_* (word stream with destination and length, tx_ready when a word is
// taken) and rx_* (one received word per cycle with its source and a last
// flag). stat reports per router and cycle the priority mode and the stall
// events. The mesh of routers with one core per router follows the
// source article; the interface to the cores is this design's.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X      = 3,
  parameter int unsigned MESH_Y      = 3,
  parameter int unsigned NUM_VC      = 4,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned LOAD_THRESH = 3,
  localparam int unsigned NODES      = MESH_X * MESH_Y
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tx_valid [NODES],
  output logic               tx_ready [NODES],
  input  logic [COORD_W-1:0] tx_dst_x [NODES],
  input  logic [COORD_W-1:0] tx_dst_y [NODES],
  input  logic [LEN_W-1:0]   tx_len   [NODES],
  input  logic [DATA_W-1:0]  tx_data  [NODES],
  output logic               rx_valid [NODES],
  output logic [DATA_W-1:0]  rx_data  [NODES],
  output logic               rx_last  [NODES],
  output logic [COORD_W-1:0] rx_src_x [NODES],
  output logic [COORD_W-1:0] rx_src_y [NODES],
  output router_stat_t       stat     [NODES]
);
  link_t   r_in   [NODES][NUM_PORTS];
  link_t   r_out  [NODES][NUM_PORTS];
  credit_t c_in   [NODES][NUM_PORTS];
  credit_t c_out  [NODES][NUM_PORTS];
  logic [NUM_PORTS-1:0] load_in [NODES];
  logic    load_out [NODES];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // North neighbour (y-1) and south neighbour (y+1).
      if (y > 0) begin : g_n
        assign r_in[N][PORT_N]    = r_out[N-MESH_X][PORT_S];
        assign c_in[N][PORT_N]    = c_out[N-MESH_X][PORT_S];
        assign load_in[N][PORT_N] = load_out[N-MESH_X];
      end else begin : g_n_edge
        assign r_in[N][PORT_N]    = '0;
        assign c_in[N][PORT_N]    = '0;
        assign load_in[N][PORT_N] = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign r_in[N][PORT_S]    = r_out[N+MESH_X][PORT_N];
        assign c_in[N][PORT_S]    = c_out[N+MESH_X][PORT_N];
        assign load_in[N][PORT_S] = load_out[N+MESH_X];
      end else begin : g_s_edge
        assign r_in[N][PORT_S]    = '0;
        assign c_in[N][PORT_S]    = '0;
        assign load_in[N][PORT_S] = 1'b0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in[N][PORT_E]    = r_out[N+1][PORT_W];
        assign c_in[N][PORT_E]    = c_out[N+1][PORT_W];
        assign load_in[N][PORT_E] = load_out[N+1];
      end else begin : g_e_edge
        assign r_in[N][PORT_E]    = '0;
        assign c_in[N][PORT_E]    = '0;
        assign load_in[N][PORT_E] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in[N][PORT_W]    = r_out[N-1][PORT_E];
        assign c_in[N][PORT_W]    = c_out[N-1][PORT_E];
        assign load_in[N][PORT_W] = load_out[N-1];
      end else begin : g_w_edge
        assign r_in[N][PORT_W]    = '0;
        assign c_in[N][PORT_W]    = '0;
        assign load_in[N][PORT_W] = 1'b0;
      end
      assign load_in[N][PORT_L] = 1'b0;

      router #(
        .NUM_VC (NUM_VC), .BUF_DEPTH (BUF_DEPTH),
        .MY_X (x), .MY_Y (y), .LOAD_THRESH (LOAD_THRESH)
      ) u_router (
        .clk, .rst_n,
        .in_link    (r_in[N]),
        .credit_out (c_out[N]),
        .out_link   (r_out[N]),
        .credit_in  (c_in[N]),
        .load_in    (load_in[N]),
        .load_out   (load_out[N]),
        .stat       (stat[N])
      );

      network_interface #(
        .NUM_VC (NUM_VC), .BUF_DEPTH (BUF_DEPTH), .MY_X (x), .MY_Y (y)
      ) u_ni (
        .clk, .rst_n,
        .tx_valid (tx_valid[N]), .tx_ready (tx_ready[N]),
        .tx_dst_x (tx_dst_x[N]), .tx_dst_y (tx_dst_y[N]),
        .tx_len   (tx_len[N]),   .tx_data  (tx_data[N]),
        .rx_valid (rx_valid[N]), .rx_data  (rx_data[N]), .rx_last (rx_last[N]),
        .rx_src_x (rx_src_x[N]), .rx_src_y (rx_src_y[N]),
        .inj_link   (r_in[N][PORT_L]),
        .inj_credit (c_out[N][PORT_L]),
        .ej_link    (r_out[N][PORT_L]),
        .ej_credit  (c_in[N][PORT_L])
      );
    end
  end
endmodule
