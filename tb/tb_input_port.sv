// tb_input_port: self-checking testbench of one router input port.
//
// The testbench plays the previous router (it sends packets of random
// length on random VCs, never more flits than a VC buffer holds, counting
// the credits that come back) and the two allocators (it grants VC
// requests after a random delay with a random output VC, and grants one
// ready VC per cycle for the switch). It checks that the route of each
// head flit follows XY routing from node (1,1), that a VC only asks for the
// switch after its VC grant, that flits leave each VC in order with the
// output VC that was granted, that every removed flit returns one credit a
// cycle later, and that the minimum head latency is two cycles from arrival
// to the VC request.
module tb_input_port;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int V = 4, D = 4;
  link_t in_link;
  credit_t credit_out;
  logic [V-1:0] va_req, va_gnt, sa_req;
  port_e route [V];
  logic [VC_IDX_W-1:0] va_vc [V];
  logic sa_gnt;
  logic [VC_IDX_W-1:0] sa_vc;
  flit_t front [V];
  logic [VC_IDX_W-1:0] outvc [V];

  input_port #(.NUM_VC(V), .DEPTH(D), .MY_X(1), .MY_Y(1)) dut (
    .clk, .rst_n, .in_link, .credit_out, .va_req, .route, .va_gnt, .va_vc,
    .sa_req, .sa_gnt, .sa_vc, .front, .outvc);

  flit_t  q      [V][$];   // flits sent and not yet removed
  port_e  rq     [V][$];   // expected route per packet
  int     cred   [V];
  int     left   [V];      // flits of the current outgoing packet still to send
  logic [VC_IDX_W-1:0] given [V];
  logic   granted[V];
  int     credit_due, pkts_done;

  function automatic port_e xy(int dx, int dy);
    if (dx > 1) return PORT_E;
    if (dx < 1) return PORT_W;
    if (dy > 1) return PORT_S;
    if (dy < 1) return PORT_N;
    return PORT_L;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_link = '0; va_gnt = 0; sa_gnt = 0; sa_vc = 0; pkts_done = 0;
    for (int v = 0; v < V; v++) begin va_vc[v] = 0; cred[v] = D; left[v] = 0; granted[v] = 0; given[v] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // Directed latency check: a single-flit packet on VC 0 to (2,1).
    begin
      head_t h;
      h = '0; h.dst_x = 2; h.dst_y = 1;
      in_link = '{valid: 1'b1, vc: 3'd0, flit: '{ftype: FT_SINGLE, data: DATA_W'(h)}};
      @(posedge clk); #1; in_link = '0;
      checks++; if (va_req[0]) begin failures++; $display("FAIL VA request too early"); end
      @(posedge clk); #1;
      checks++; if (!va_req[0] || route[0] != PORT_E) begin failures++; $display("FAIL VA request/route after 2 cycles"); end
      va_gnt[0] = 1; va_vc[0] = 3'd2;
      @(posedge clk); #1; va_gnt = 0;
      checks++; if (!sa_req[0] || outvc[0] != 3'd2) begin failures++; $display("FAIL switch request after VC grant"); end
      sa_gnt = 1; sa_vc = 0;
      @(posedge clk); #1; sa_gnt = 0;
      checks++; if (!credit_out.valid || credit_out.vc != 0) begin failures++; $display("FAIL credit"); end
      @(posedge clk); #1;
      checks++; if (sa_req[0] || va_req[0]) begin failures++; $display("FAIL VC not idle"); end
    end

    for (int i = 0; i < 30000; i++) begin
      int sv, gv;
      // sender
      in_link = '0;
      sv = $urandom_range(0, V - 1);
      if (cred[sv] > 0 && $urandom_range(0, 1) == 0) begin
        flit_t f;
        if (left[sv] == 0) begin
          head_t h;
          int dx, dy, len;
          dx = $urandom_range(0, 2); dy = $urandom_range(0, 2); len = $urandom_range(0, 5);
          h = '0; h.dst_x = COORD_W'(dx); h.dst_y = COORD_W'(dy); h.len = LEN_W'(len);
          f.ftype = (len == 0) ? FT_SINGLE : FT_HEAD;
          f.data  = DATA_W'(h);
          rq[sv].push_back(xy(dx, dy));
          left[sv] = len;
        end else begin
          f.ftype = (left[sv] == 1) ? FT_TAIL : FT_BODY;
          f.data  = DATA_W'($urandom);
          left[sv]--;
        end
        in_link = '{valid: 1'b1, vc: VC_IDX_W'(sv), flit: f};
        q[sv].push_back(f);
        cred[sv]--;
      end
      // allocators
      va_gnt = 0;
      for (int v = 0; v < V; v++) begin
        if (va_req[v]) begin
          checks++;
          if (rq[v].size() == 0 || route[v] != rq[v][0]) begin failures++; $display("FAIL route vc %0d", v); end
          if ($urandom_range(0, 2) == 0) begin
            va_gnt[v] = 1; va_vc[v] = VC_IDX_W'($urandom_range(0, V - 1)); given[v] = va_vc[v]; granted[v] = 1;
          end
        end
        if (sa_req[v] && !granted[v]) begin failures++; $display("FAIL switch request before VC grant"); end
      end
      sa_gnt = 0;
      gv = $urandom_range(0, V - 1);
      if (sa_req[gv] && $urandom_range(0, 3) != 0) begin
        checks++;
        if (q[gv].size() == 0 || front[gv] != q[gv][0] || outvc[gv] != given[gv]) begin
          failures++; $display("FAIL front of vc %0d", gv);
        end
        sa_gnt = 1; sa_vc = VC_IDX_W'(gv);
      end
      @(posedge clk); #1;
      credit_due = sa_gnt ? gv : -1;
      if (credit_due >= 0) begin
        checks++;
        if (!credit_out.valid || 32'(credit_out.vc) != credit_due) begin failures++; $display("FAIL credit return"); end
        cred[credit_due]++;
      end else begin
        checks++;
        if (credit_out.valid) begin failures++; $display("FAIL spurious credit"); end
      end
      if (sa_gnt) begin
        flit_t f;
        f = q[gv].pop_front();
        if (is_tail(f)) begin void'(rq[gv].pop_front()); granted[gv] = 0; pkts_done++; end
      end
    end
    checks++;
    if (pkts_done < 200) begin failures++; $display("FAIL only %0d packets", pkts_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
