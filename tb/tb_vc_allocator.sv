// tb_vc_allocator: self-checking testbench of the two-stage VC allocator.
//
// A reference model keeps a round-robin pointer per input VC (stage 1, over
// the free VCs of the requested output port) and per output VC (stage 2,
// over all P*V input VCs). With random requests, routes, free masks and
// modes it predicts every grant, granted VC number and allocated output VC:
// fixed mode takes the lowest index in both stages; in rotating mode a
// stage-1 pointer moves only when its input VC is granted and a stage-2
// pointer moves past its winner. Competition for one output VC must occur.
module tb_vc_allocator;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int P = 5, V = 4, PV = P * V;
  logic rot;
  logic [V-1:0] req [P];
  port_e route [P][V];
  logic [V-1:0] free [P];
  logic [V-1:0] gnt [P];
  logic [VC_IDX_W-1:0] gnt_vc [P][V];
  logic [V-1:0] alloc [P];

  int p1 [P][V];
  int p2 [P][V];
  int n_lost = 0;

  vc_allocator #(.P(P), .V(V)) dut (.clk, .rst_n, .rotate(rot), .req, .route, .free, .gnt, .gnt_vc, .alloc);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w1 [P][V];
    int w2 [P][V];
    rot = 0;
    for (int p = 0; p < P; p++) begin
      req[p] = 0; free[p] = 0;
      for (int v = 0; v < V; v++) begin route[p][v] = PORT_L; p1[p][v] = 0; p2[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      rot = $urandom_range(0, 1);
      for (int p = 0; p < P; p++) begin
        req[p]  = V'($urandom) & V'($urandom);
        free[p] = V'($urandom) | V'($urandom);
        for (int v = 0; v < V; v++) route[p][v] = port_e'($urandom_range(0, P - 1));
      end
      #1;
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
        int st;
        st = rot ? p1[p][v] : 0;
        w1[p][v] = -1;
        if (req[p][v])
          for (int k = 0; k < V; k++)
            if (w1[p][v] < 0 && free[route[p][v]][(st + k) % V]) w1[p][v] = (st + k) % V;
      end
      for (int o = 0; o < P; o++) for (int w = 0; w < V; w++) begin
        int st, cnt;
        st = rot ? p2[o][w] : 0;
        w2[o][w] = -1; cnt = 0;
        for (int k = 0; k < PV; k++) begin
          int c;
          c = (st + k) % PV;
          if (w1[c / V][c % V] == w && 32'(route[c / V][c % V]) == o) begin
            cnt++;
            if (w2[o][w] < 0) w2[o][w] = c;
          end
        end
        if (cnt > 1) n_lost++;
        checks++;
        if (alloc[o][w] != (w2[o][w] >= 0)) begin failures++; $display("FAIL cycle %0d alloc %0d/%0d", i, o, w); end
      end
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
        int e;
        e = -1;
        for (int o = 0; o < P; o++) for (int w = 0; w < V; w++) if (w2[o][w] == p * V + v) e = w;
        checks++;
        if (gnt[p][v] != (e >= 0) || (e >= 0 && 32'(gnt_vc[p][v]) != e)) begin
          failures++; $display("FAIL cycle %0d input vc %0d/%0d gnt=%b vc=%0d expected %0d", i, p, v, gnt[p][v], gnt_vc[p][v], e);
        end
        if (rot && e >= 0) p1[p][v] = (e + 1) % V;
      end
      if (rot) for (int o = 0; o < P; o++) for (int w = 0; w < V; w++)
        if (w2[o][w] >= 0) p2[o][w] = (w2[o][w] + 1) % PV;
      @(posedge clk); #1;
    end
    checks++;
    if (n_lost == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
