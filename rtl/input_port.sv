// input_port: one input port of the router: a flit buffer per virtual
// channel (VC) and the per-VC packet state.
//
// Each VC walks through three states. IDLE: when a head flit reaches the
// front of its buffer the route is computed (XY routing) and stored, and
// the VC moves to VC_ALLOC. VC_ALLOC: the VC requests an output VC at its
// output port from the VC allocator until one is granted and stored. ACTIVE:
// the VC requests the switch while its buffer holds a flit; each switch
// grant removes one flit, and the tail flit returns the VC to IDLE. Every
// flit removed sends a credit for its VC back upstream one cycle later.
//
// Timing: a head flit written in cycle t is routed in t+1, may win VC
// allocation in t+2 and the switch from t+3. Interface: in_link from the
// previous router, credit_out to it; va_* and sa_* to the allocators;
// fronts and outvc to the crossbar. The buffers and the routing, VC
// allocation and switch allocation stages follow the source article's router;
// the state machine, its timing and the credit return are this design's.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC = 4,
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  link_t               in_link,
  output credit_t             credit_out,
  // VC allocation
  output logic [NUM_VC-1:0]   va_req,
  output port_e               route   [NUM_VC],
  input  logic [NUM_VC-1:0]   va_gnt,
  input  logic [VC_IDX_W-1:0] va_vc   [NUM_VC],
  // switch allocation
  output logic [NUM_VC-1:0]   sa_req,
  input  logic                sa_gnt,
  input  logic [VC_IDX_W-1:0] sa_vc,
  // to the crossbar
  output flit_t               front   [NUM_VC],
  output logic [VC_IDX_W-1:0] outvc   [NUM_VC]
);
  typedef enum logic [1:0] {VC_IDLE, VC_ALLOC, VC_ACTIVE} vc_state_e;

  vc_state_e state_q [NUM_VC];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic  push, pop, empty, full;
    logic [$clog2(DEPTH+1)-1:0] count;
    logic [FLIT_W-1:0] dout;
    head_t hd;
    port_e rc_port;

    assign push = in_link.valid && 32'(in_link.vc) == v;
    assign pop  = sa_gnt && 32'(sa_vc) == v;

    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n, .push, .din (in_link.flit), .pop,
      .dout, .empty, .full, .count
    );

    assign front[v] = flit_t'(dout);
    assign hd       = head_t'(front[v].data);

    route_compute #(.MY_X(MY_X), .MY_Y(MY_Y)) u_rc (
      .dst_x (hd.dst_x), .dst_y (hd.dst_y), .out_port (rc_port)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        state_q[v] <= VC_IDLE;
        route[v]   <= PORT_L;
        outvc[v]   <= '0;
      end else begin
        unique case (state_q[v])
          VC_IDLE: if (!empty && is_head(front[v])) begin
            route[v]   <= rc_port;
            state_q[v] <= VC_ALLOC;
          end
          VC_ALLOC: if (va_gnt[v]) begin
            outvc[v]   <= va_vc[v];
            state_q[v] <= VC_ACTIVE;
          end
          VC_ACTIVE: if (pop && is_tail(front[v])) state_q[v] <= VC_IDLE;
          default: state_q[v] <= VC_IDLE;
        endcase
      end
    end

    assign va_req[v]   = (state_q[v] == VC_ALLOC);
    assign sa_req[v]   = (state_q[v] == VC_ACTIVE) && !empty;

    // A buffer in IDLE must hold a head flit at its front.
    assert property (@(posedge clk) disable iff (!rst_n)
      (state_q[v] == VC_IDLE && !empty) |-> is_head(front[v]));
    assert property (@(posedge clk) disable iff (!rst_n) pop |-> state_q[v] == VC_ACTIVE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) credit_out <= '0;
    else        credit_out <= '{valid: sa_gnt, vc: sa_vc};
  end
endmodule
