// tb_network_interface: self-checking testbench of the network interface
// at node (2,0).
//
// Transmit: a core model offers packets of random destination and length
// (1..8 words) as word streams. A model of the router's local input checks
// each head (destination, source (2,0), length), checks that the words
// arrive in order on one VC with the last one typed tail, never lets the
// NI exceed the buffer space of a VC, and returns credits after a random
// delay, so the NI must also stall for credit.
// Receive: packets from sources with random coordinates are sent into the
// NI interleaved over the VCs; each body or tail word must come out a cycle
// later with its source and last flag, and each flit must return a credit.
module tb_network_interface;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int V = 4, D = 4;
  logic tx_valid, tx_ready, rx_valid, rx_last;
  logic [COORD_W-1:0] tx_dst_x, tx_dst_y, rx_src_x, rx_src_y;
  logic [LEN_W-1:0] tx_len;
  logic [DATA_W-1:0] tx_data, rx_data;
  link_t inj_link, ej_link;
  credit_t inj_credit, ej_credit;

  network_interface #(.NUM_VC(V), .BUF_DEPTH(D), .MY_X(2), .MY_Y(0)) dut (
    .clk, .rst_n, .tx_valid, .tx_ready, .tx_dst_x, .tx_dst_y, .tx_len, .tx_data,
    .rx_valid, .rx_data, .rx_last, .rx_src_x, .rx_src_y,
    .inj_link, .inj_credit, .ej_link, .ej_credit);

  int held [V];
  int tx_words [$];        // words the core has handed over, in order
  int cur_vc = -1, cur_left = 0, cur_dx, cur_dy, cur_len;
  int tx_pkts = 0, rx_words = 0, n_stall = 0;
  int exp_dx, exp_dy, exp_len;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // router-side model of the local input buffer
  always @(posedge clk) if (rst_n) begin
    inj_credit <= '0;
    if (inj_link.valid) begin
      int w;
      w = int'(inj_link.vc);
      held[w]++;
      checks++;
      if (held[w] > D) begin failures++; $display("FAIL NI overran VC %0d", w); end
      if (is_head(inj_link.flit)) begin
        head_t h;
        h = head_t'(inj_link.flit.data);
        checks++;
        if (cur_vc != -1 || h.src_x != 2 || h.src_y != 0 || int'(h.dst_x) != exp_dx ||
            int'(h.dst_y) != exp_dy || int'(h.len) != exp_len) begin
          failures++; $display("FAIL head flit %h", inj_link.flit);
        end
        cur_vc = w; cur_left = int'(h.len);
      end else begin
        checks++;
        if (w != cur_vc || tx_words.size() == 0 || inj_link.flit.data != DATA_W'(tx_words[0]) ||
            is_tail(inj_link.flit) != (cur_left == 1)) begin
          failures++; $display("FAIL body flit %h", inj_link.flit);
        end
        if (tx_words.size() != 0) void'(tx_words.pop_front());
        cur_left--;
        if (cur_left == 0) begin cur_vc = -1; tx_pkts++; end
      end
    end
    if ($urandom_range(0, 1) == 0) begin
      int w;
      w = $urandom_range(0, V - 1);
      if (held[w] > 0) begin held[w]--; inj_credit <= '{valid: 1'b1, vc: VC_IDX_W'(w)}; end
    end
  end

  // core transmit model
  initial begin
    tx_valid = 0; tx_dst_x = 0; tx_dst_y = 0; tx_len = 0; tx_data = 0;
    for (int v = 0; v < V; v++) held[v] = 0;
    wait (rst_n);
    for (int k = 0; k < 300; k++) begin
      int len;
      @(posedge clk); #1;
      len = $urandom_range(1, 8);
      exp_dx = $urandom_range(0, 2); exp_dy = $urandom_range(0, 2); exp_len = len;
      tx_dst_x = COORD_W'(exp_dx); tx_dst_y = COORD_W'(exp_dy); tx_len = LEN_W'(len);
      for (int j = 0; j < len; j++) begin
        tx_valid = 1; tx_data = DATA_W'($urandom);
        #1;
        while (!tx_ready) begin n_stall++; @(posedge clk); #1; end
        tx_words.push_back(int'(tx_data));
        @(posedge clk); #1;
      end
      tx_valid = 0;
    end
  end

  // receive side
  int rx_exp_data [$];
  int rx_exp_src  [$];
  int rx_exp_last [$];
  int credit_exp = -1;

  always @(negedge clk) if (rst_n) begin
    // outputs for the flit taken at the last rising edge
    if (rx_exp_data.size() != 0) begin
      checks++;
      if (!rx_valid || rx_data != DATA_W'(rx_exp_data[0]) ||
          int'({rx_src_x, rx_src_y}) != rx_exp_src[0] || int'(rx_last) != rx_exp_last[0]) begin
        failures++; $display("FAIL rx word");
      end
      void'(rx_exp_data.pop_front()); void'(rx_exp_src.pop_front()); void'(rx_exp_last.pop_front());
      rx_words++;
    end else begin
      checks++;
      if (rx_valid) begin failures++; $display("FAIL spurious rx word"); end
    end
    if (credit_exp >= 0) begin
      checks++;
      if (!ej_credit.valid || int'(ej_credit.vc) != credit_exp) begin failures++; $display("FAIL ejection credit"); end
    end
  end

  initial begin
    int left [V];
    int src [V];
    ej_link = '0; inj_credit = '0;
    for (int v = 0; v < V; v++) left[v] = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int v;
      ej_link = '0;
      v = $urandom_range(0, V - 1);
      if ($urandom_range(0, 2) != 0) begin
        if (left[v] < 0) begin
          head_t h;
          h = '0; h.dst_x = 2; h.dst_y = 0;
          h.src_x = COORD_W'($urandom_range(0, 2)); h.src_y = COORD_W'($urandom_range(0, 2));
          h.len = LEN_W'($urandom_range(1, 5));
          src[v] = int'({h.src_x, h.src_y}); left[v] = int'(h.len);
          ej_link = '{valid: 1'b1, vc: VC_IDX_W'(v), flit: '{ftype: FT_HEAD, data: DATA_W'(h)}};
        end else begin
          int d;
          d = $urandom;
          ej_link = '{valid: 1'b1, vc: VC_IDX_W'(v), flit: '{ftype: (left[v] == 1) ? FT_TAIL : FT_BODY, data: DATA_W'(d)}};
          left[v]--;
          if (left[v] == 0) left[v] = -1;
        end
      end
      @(posedge clk);
      credit_exp = ej_link.valid ? int'(ej_link.vc) : -1;
      if (ej_link.valid && !is_head(ej_link.flit)) begin
        rx_exp_data.push_back(int'(ej_link.flit.data));
        rx_exp_src.push_back(src[v]);
        rx_exp_last.push_back(int'(is_tail(ej_link.flit)));
      end
      #1;
    end
    ej_link = '0;
    @(posedge clk); credit_exp = -1;
    for (int i = 0; i < 20000 && tx_pkts < 300; i++) @(posedge clk);
    #1;
    checks++;
    if (tx_pkts != 300) begin failures++; $display("FAIL transmitted %0d packets", tx_pkts); end
    checks++;
    if (n_stall == 0 || rx_words < 1000) begin failures++; $display("FAIL coverage stall=%0d rx=%0d", n_stall, rx_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
