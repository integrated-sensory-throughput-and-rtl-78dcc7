// tb_router: self-checking testbench of one router, the node in the middle
// of a 3 x 3 mesh (x = 1, y = 1).
//
// Five sources, one per input port, send packets of random length to
// random destinations on random VCs and obey the credits the router
// returns. Five sinks take every flit, hold it for a random time as a model
// of the next router's buffer and then return its credit. The checks: the
// first packet, sent into an empty router, leaves exactly 4 cycles after it
// entered; every packet leaves through the XY-routing port; a packet's flits
// leave in order, on one output VC, without another packet on that VC
// between head and tail; the router never sends more flits on a VC than the
// sink has room for; and every packet arrives. Alternating phases of heavy
// and light injection and neighbour load make the arbiters change between
// fixed and rotating priority; switch and VC
// allocation conflicts and credit stalls are counted, and each must occur.
module tb_router;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int P = NUM_PORTS, V = 4, D = 4;
  localparam int PKTS = 150;   // per input port

  link_t   in_link   [P];
  credit_t credit_out[P];
  link_t   out_link  [P];
  credit_t credit_in [P];
  logic [P-1:0] load_in;
  logic load_out;
  router_stat_t stat;

  router #(.NUM_VC(V), .BUF_DEPTH(D), .MY_X(1), .MY_Y(1)) dut (
    .clk, .rst_n, .in_link, .credit_out, .out_link, .credit_in, .load_in, .load_out, .stat);

  // source state
  int src_cred [P][V];
  int src_left [P][V];     // body flits left of the packet in progress (-1: none)
  int src_id   [P][V];
  int src_sent [P];
  // expected packets: id -> output port, length
  int exp_port [int];
  int exp_len  [int];
  // sink state
  int sink_cnt [P][V];
  int cur_id   [P][V];     // packet in progress per output VC (-1: none)
  int cur_idx  [P][V];
  int delivered = 0, total = 0, next_id = 0;
  int n_rot = 0, n_mode_sw = 0, n_sa = 0, n_va = 0, n_cr = 0;
  logic last_rot = 0;

  function automatic port_e xy(int dx, int dy);
    if (dx > 1) return PORT_E;
    if (dx < 1) return PORT_W;
    if (dy > 1) return PORT_S;
    if (dy < 1) return PORT_N;
    return PORT_L;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired: delivered %0d of %0d", delivered, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sinks: check and absorb output flits, return credits
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < P; o++) begin
      credit_in[o] <= '0;
      if (out_link[o].valid) begin
        link_t l;
        int w;
        l = out_link[o]; w = int'(l.vc);
        sink_cnt[o][w]++;
        checks++;
        if (sink_cnt[o][w] > D) begin failures++; $display("FAIL overflow port %0d vc %0d", o, w); end
        if (is_head(l.flit)) begin
          head_t h;
          int id;
          h = head_t'(l.flit.data); id = int'(h.tag);
          checks++;
          if (cur_id[o][w] != -1) begin failures++; $display("FAIL head on busy VC %0d/%0d", o, w); end
          if (!exp_port.exists(id) || exp_port[id] != o) begin
            failures++; $display("FAIL packet %0d left on port %0d", id, o);
          end
          cur_id[o][w] = id; cur_idx[o][w] = 0;
        end else begin
          checks++;
          if (cur_id[o][w] == -1 || l.flit.data != DATA_W'(cur_id[o][w] * 64 + cur_idx[o][w])) begin
            failures++; $display("FAIL body flit out of order on %0d/%0d", o, w);
          end
          cur_idx[o][w]++;
        end
        if (is_tail(l.flit)) begin
          checks++;
          if (cur_idx[o][w] != exp_len[cur_id[o][w]]) begin failures++; $display("FAIL packet length"); end
          cur_id[o][w] = -1;
          delivered++;
        end
      end
      // drain one flit per port now and then
      if ($urandom_range(0, 2) != 0) begin
        int w;
        w = $urandom_range(0, V - 1);
        if (sink_cnt[o][w] > 0) begin
          sink_cnt[o][w]--;
          credit_in[o] <= '{valid: 1'b1, vc: VC_IDX_W'(w)};
        end
      end
    end
  end

  // credits returned by the router to the sources
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < P; p++) if (credit_out[p].valid) src_cred[p][credit_out[p].vc]++;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (stat.rotate) n_rot++;
    if (stat.rotate != last_rot) n_mode_sw++;
    last_rot <= stat.rotate;
    if (stat.sa_conflict) n_sa++;
    if (stat.va_conflict) n_va++;
    if (stat.credit_stall) n_cr++;
  end

  task automatic send_flit(int p, int v);
    flit_t f;
    if (src_left[p][v] < 0) begin
      head_t h;
      int dx, dy, len;
      dx = $urandom_range(0, 2); dy = $urandom_range(0, 2); len = $urandom_range(0, 6);
      h = '0; h.dst_x = COORD_W'(dx); h.dst_y = COORD_W'(dy); h.len = LEN_W'(len);
      h.tag = 14'(next_id);
      exp_port[next_id] = int'(xy(dx, dy)); exp_len[next_id] = len;
      src_id[p][v] = next_id; next_id++; total++; src_sent[p]++;
      f = '{ftype: (len == 0) ? FT_SINGLE : FT_HEAD, data: DATA_W'(h)};
      src_left[p][v] = len;
      if (len == 0) src_left[p][v] = -1;
    end else begin
      int idx;
      idx = exp_len[src_id[p][v]] - src_left[p][v];
      f = '{ftype: (src_left[p][v] == 1) ? FT_TAIL : FT_BODY, data: DATA_W'(src_id[p][v] * 64 + idx)};
      src_left[p][v]--;
      if (src_left[p][v] == 0) src_left[p][v] = -1;
    end
    in_link[p] = '{valid: 1'b1, vc: VC_IDX_W'(v), flit: f};
    src_cred[p][v]--;
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin
      in_link[p] = '0; credit_in[p] = '0; src_sent[p] = 0;
      for (int v = 0; v < V; v++) begin
        src_cred[p][v] = D; src_left[p][v] = -1; src_id[p][v] = 0;
        sink_cnt[p][v] = 0; cur_id[p][v] = -1; cur_idx[p][v] = 0;
      end
    end
    load_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // Directed: one single-flit packet from the west input to (2,1): east.
    begin
      head_t h;
      h = '0; h.dst_x = 2; h.dst_y = 1; h.tag = 14'(next_id);
      exp_port[next_id] = PORT_E; exp_len[next_id] = 0; next_id++; total++;
      in_link[PORT_W] = '{valid: 1'b1, vc: 3'd1, flit: '{ftype: FT_SINGLE, data: DATA_W'(h)}};
      src_cred[PORT_W][1]--;
      @(posedge clk); #1; in_link[PORT_W] = '0;
      for (int c = 1; c <= 4; c++) begin
        checks++;
        if (out_link[PORT_E].valid != (c == 4)) begin
          failures++; $display("FAIL latency: cycle %0d valid=%b", c, out_link[PORT_E].valid);
        end
        @(posedge clk); #1;
      end
    end

    // Random traffic from all five inputs.
    for (int i = 0; i < 100000; i++) begin
      logic more;
      more = 0;
      for (int p = 0; p < P; p++) begin
        int v;
        in_link[p] = '0;
        v = $urandom_range(0, V - 1);
        if (src_cred[p][v] > 0 && (src_left[p][v] >= 0 || src_sent[p] < PKTS) &&
            (((i / 400) % 2 == 0) ? $urandom_range(0, 3) != 0 : $urandom_range(0, 39) == 0))
          send_flit(p, v);
        for (int k = 0; k < V; k++) if (src_left[p][k] >= 0) more = 1;
        if (src_sent[p] < PKTS) more = 1;
      end
      // heavy and light phases of 400 cycles; neighbours busy in heavy ones
      if (i % 400 == 0) load_in = ((i / 400) % 2 == 0) ? P'($urandom) : '0;
      @(posedge clk); #1;
      if (!more) break;
    end
    for (int p = 0; p < P; p++) in_link[p] = '0;
    for (int i = 0; i < 5000 && delivered < total; i++) @(posedge clk);
    #1;
    checks++;
    if (delivered != total) begin failures++; $display("FAIL delivered %0d of %0d", delivered, total); end
    $display("events: rotating cycles %0d, mode changes %0d, SA conflicts %0d, VA conflicts %0d, credit stalls %0d",
             n_rot, n_mode_sw, n_sa, n_va, n_cr);
    checks++; if (n_rot == 0 || n_mode_sw < 2) begin failures++; $display("FAIL mode switching not seen"); end
    checks++; if (n_sa == 0) begin failures++; $display("FAIL no switch conflict"); end
    checks++; if (n_va == 0) begin failures++; $display("FAIL no VC conflict"); end
    checks++; if (n_cr == 0) begin failures++; $display("FAIL no credit stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
