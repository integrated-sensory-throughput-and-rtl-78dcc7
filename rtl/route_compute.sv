// route_compute: routing computation (RC) of a router in the 2D mesh.
//
// Dimension-order (XY) routing: a packet first travels along x until its
// column matches, then along y, then leaves through the local port. Row 0
// is the northern edge, so a smaller y lies to the north. XY routing is
// free of deadlock on a mesh without further help. The source article names the
// routing stage but does not give its algorithm; XY routing is this
// design's choice. Purely combinational.
module route_compute
  import noc_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);
  always_comb begin
    if (32'(dst_x) > MY_X)      out_port = PORT_E;
    else if (32'(dst_x) < MY_X) out_port = PORT_W;
    else if (32'(dst_y) > MY_Y) out_port = PORT_S;
    else if (32'(dst_y) < MY_Y) out_port = PORT_N;
    else                        out_port = PORT_L;
  end
endmodule
