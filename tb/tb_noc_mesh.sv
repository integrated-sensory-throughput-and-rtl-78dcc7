// tb_noc_mesh: end-to-end testbench of the 3 x 3 mesh with 2 VCs per port
// and 4-flit buffers (the default is 4 VCs; tb_noc_mesh_full runs that).
//
// Every node has a core model that offers packets to its network interface
// and checks what it receives. Each data word carries the packet number and
// the word's index, so the receiver can check that each word reaches the
// right node from the right source, in order within its packet, with the
// last flag on the last word, and that every packet arrives exactly once.
//
// Phases: (1) one packet from node (0,0) to node (2,2) through an empty
// network, whose first word must arrive after 4 cycles per router plus 3
// (network interface and link registers); (2) uniform random traffic at a
// light and then a heavy injection rate; (3) transpose traffic, node (x,y)
// to node (y,x), at a heavy rate. The testbench counts, over all routers,
// the cycles in rotating priority, the changes between fixed and rotating
// priority, switch and VC allocation conflicts, credit stalls and cycles in
// which a core waited for its network interface; each must occur.
// (4) A sweep of flit injection rates 0.02 to 0.14 flits per node and cycle
// with 4-word packets, uniform random and transpose, prints the delivered
// throughput (flits per node and cycle, measured over the injection window).
module tb_noc_mesh;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int MX = 3, MY = 3, NN = MX * MY;

  logic               tx_valid [NN];
  logic               tx_ready [NN];
  logic [COORD_W-1:0] tx_dst_x [NN];
  logic [COORD_W-1:0] tx_dst_y [NN];
  logic [LEN_W-1:0]   tx_len   [NN];
  logic [DATA_W-1:0]  tx_data  [NN];
  logic               rx_valid [NN];
  logic [DATA_W-1:0]  rx_data  [NN];
  logic               rx_last  [NN];
  logic [COORD_W-1:0] rx_src_x [NN];
  logic [COORD_W-1:0] rx_src_y [NN];
  router_stat_t       stat     [NN];

  noc_mesh #(.NUM_VC(2)) dut (.clk, .rst_n, .tx_valid, .tx_ready, .tx_dst_x, .tx_dst_y, .tx_len, .tx_data,
                .rx_valid, .rx_data, .rx_last, .rx_src_x, .rx_src_y, .stat);

  // packet bookkeeping
  int pk_src [int];
  int pk_dst [int];
  int pk_len [int];
  int pk_next[int];
  int next_id = 0, sent_pkts = 0, recv_pkts = 0, recv_words = 0;
  // per node transmit state
  int cur_id [NN];
  int cur_idx[NN];
  // traffic control
  int pattern = 0;          // 0: uniform random, 1: transpose
  int rate_pm = 0;          // packet start probability per node and cycle, per mille
  int fixed_len = 0;        // 0: random length 1..6
  bit running = 0;
  // mechanism counters
  int n_rot = 0, n_sw = 0, n_sa = 0, n_va = 0, n_cr = 0, n_wait = 0;
  logic last_rot [NN];
  longint cyc = 0;

  function automatic logic [DATA_W-1:0] word(int id, int idx);
    return DATA_W'(id * 256 + idx);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent_pkts, recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cores: transmit
  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int n = 0; n < NN; n++) begin
      if (tx_valid[n] && tx_ready[n]) begin
        cur_idx[n]++;
        if (cur_idx[n] == pk_len[cur_id[n]]) begin
          tx_valid[n] <= 1'b0;
          cur_id[n] = -1;
        end else tx_data[n] <= word(cur_id[n], cur_idx[n]);
      end else if (tx_valid[n]) n_wait++;
      else if (running && cur_id[n] < 0 && $urandom_range(0, 999) < rate_pm) begin
        int x, y, d, len;
        x = n % MX; y = n / MX;
        if (pattern == 1) d = (x == y) ? -1 : x * MX + y;
        else begin
          d = $urandom_range(0, NN - 2);
          if (d >= n) d++;
        end
        if (d >= 0) begin
          len = (fixed_len > 0) ? fixed_len : $urandom_range(1, 6);
          pk_src[next_id] = n; pk_dst[next_id] = d; pk_len[next_id] = len; pk_next[next_id] = 0;
          cur_id[n] = next_id; cur_idx[n] = 0;
          tx_valid[n] <= 1'b1;
          tx_dst_x[n] <= COORD_W'(d % MX);
          tx_dst_y[n] <= COORD_W'(d / MX);
          tx_len[n]   <= LEN_W'(len);
          tx_data[n]  <= word(next_id, 0);
          next_id++; sent_pkts++;
        end
      end
    end
  end

  // cores: receive and check
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) if (rx_valid[n]) begin
      int id, idx;
      id = int'(rx_data[n]) / 256; idx = int'(rx_data[n]) % 256;
      recv_words++;
      checks++;
      if (!pk_dst.exists(id) || pk_dst[id] != n || pk_src[id] != int'(rx_src_y[n]) * MX + int'(rx_src_x[n]) ||
          pk_next[id] != idx || rx_last[n] != (idx == pk_len[id] - 1)) begin
        failures++;
        $display("FAIL node %0d word id=%0d idx=%0d src=(%0d,%0d) last=%b", n, id, idx, rx_src_x[n], rx_src_y[n], rx_last[n]);
      end else begin
        pk_next[id]++;
        if (rx_last[n]) recv_pkts++;
      end
    end
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (stat[n].rotate) n_rot++;
      if (stat[n].rotate != last_rot[n]) n_sw++;
      last_rot[n] <= stat[n].rotate;
      if (stat[n].sa_conflict) n_sa++;
      if (stat[n].va_conflict) n_va++;
      if (stat[n].credit_stall) n_cr++;
    end
  end

  task automatic drain();
    for (int i = 0; i < 20000 && recv_pkts < sent_pkts; i++) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  task automatic phase(string name, int pat, int rate, int cycles);
    int s0, w0;
    longint c0;
    s0 = recv_pkts; w0 = recv_words; c0 = cyc;
    pattern = pat; rate_pm = rate; running = 1;
    repeat (cycles) @(posedge clk);
    running = 0;
    drain();
    $display("%s: %0d packets, %0d words delivered in %0d cycles (%0.4f words per node and cycle)",
             name, recv_pkts - s0, recv_words - w0, cyc - c0, real'(recv_words - w0) / real'(NN * (cyc - c0)));
  endtask

  initial begin
    for (int n = 0; n < NN; n++) begin
      tx_valid[n] = 0; tx_dst_x[n] = 0; tx_dst_y[n] = 0; tx_len[n] = 0; tx_data[n] = 0;
      cur_id[n] = -1; cur_idx[n] = 0; last_rot[n] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // (1) zero-load latency: (0,0) -> (2,2) crosses 5 routers
    begin
      longint t0;
      @(posedge clk);
      pk_src[next_id] = 0; pk_dst[next_id] = 8; pk_len[next_id] = 2; pk_next[next_id] = 0;
      cur_id[0] = next_id; cur_idx[0] = 0;
      tx_valid[0] <= 1; tx_dst_x[0] <= 2; tx_dst_y[0] <= 2; tx_len[0] <= 2; tx_data[0] <= word(next_id, 0);
      next_id++; sent_pkts++;
      t0 = cyc + 1;   // first cycle with tx_valid high
      while (!rx_valid[8]) @(posedge clk);
      checks++;
      if (cyc - t0 != 4 * 5 + 3) begin
        failures++; $display("FAIL zero-load latency %0d cycles, expected %0d", cyc - t0, 4 * 5 + 3);
      end else $display("zero-load latency over 5 routers: %0d cycles", cyc - t0);
      drain();
    end

    // (2) uniform random traffic, light then heavy; (3) transpose, heavy
    phase("uniform random, light", 0, 10, 1500);
    phase("uniform random, heavy", 0, 250, 1500);
    phase("uniform random, light", 0, 10, 1500);
    phase("transpose, heavy", 1, 250, 1500);

    // (4) injection-rate sweep with 4-word packets (5 flits): flit injection
    // rate FIR per node and cycle, packet start probability FIR / 5
    fixed_len = 4;
    for (int pat = 0; pat < 2; pat++) begin
      for (int fir = 2; fir <= 14; fir += 4) begin
        int s0, w0;
        longint c0;
        s0 = recv_pkts; w0 = recv_words; c0 = cyc;
        pattern = pat; rate_pm = fir * 10 / 5; running = 1;
        repeat (2000) @(posedge clk);
        running = 0;
        $display("sweep %s FIR %0.2f: throughput %0.4f flits per node and cycle",
                 pat == 0 ? "uniform random" : "transpose", real'(fir) / 100.0,
                 real'((recv_words - w0) + (recv_pkts - s0)) / real'(NN * (cyc - c0)));
        drain();
      end
    end

    checks++;
    if (recv_pkts != sent_pkts) begin failures++; $display("FAIL received %0d of %0d packets", recv_pkts, sent_pkts); end
    foreach (pk_next[id]) begin
      checks++;
      if (pk_next[id] != pk_len[id]) begin failures++; $display("FAIL packet %0d incomplete", id); end
    end
    $display("events: rotating router-cycles %0d, mode changes %0d, SA conflicts %0d, VA conflicts %0d, credit stalls %0d, core waits %0d",
             n_rot, n_sw, n_sa, n_va, n_cr, n_wait);
    checks++; if (n_rot == 0 || n_sw < 2) begin failures++; $display("FAIL priority mode never switched"); end
    checks++; if (n_sa == 0) begin failures++; $display("FAIL no switch allocation conflict"); end
    checks++; if (n_va == 0) begin failures++; $display("FAIL no VC allocation conflict"); end
    checks++; if (n_cr == 0) begin failures++; $display("FAIL no credit stall"); end
    checks++; if (n_wait == 0) begin failures++; $display("FAIL cores never waited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
