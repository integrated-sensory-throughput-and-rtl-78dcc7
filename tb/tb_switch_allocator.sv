// tb_switch_allocator: self-checking testbench of the two-stage switch
// allocator.
//
// A reference model holds a round-robin pointer per input port (stage 1)
// and a least-recently-served list per output port (stage 2). With random
// requests, routes and modes every cycle, the model predicts the full
// result: in fixed mode the lowest requesting VC and then the lowest input
// port win; in rotating mode the pointers and lists decide, a stage-1
// pointer moves only when its input port wins stage 2, and a stage-2 list
// moves its winner to the end. Grants, chosen VCs, crossbar enables and
// selections are compared every cycle. Contention (an input port losing
// stage 2) must occur.
module tb_switch_allocator;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int P = 5, V = 4;
  logic rot;
  logic [V-1:0] req [P];
  port_e route [P][V];
  logic [P-1:0] in_gnt, out_en, s1_any;
  logic [VC_IDX_W-1:0] in_vc [P];
  logic [2:0] out_sel [P];

  int ptr [P];
  int ord [P][$];
  int n_lost = 0;

  switch_allocator #(.P(P), .V(V)) dut (.clk, .rst_n, .rotate(rot), .req, .route,
    .in_gnt, .in_vc, .out_en, .out_sel, .s1_any);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w1 [P];
    int w2 [P];
    int pos2 [P];
    rot = 0;
    for (int p = 0; p < P; p++) begin
      req[p] = 0; ptr[p] = 0;
      for (int v = 0; v < V; v++) route[p][v] = PORT_L;
      for (int k = 0; k < P; k++) ord[p].push_back(k);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      rot = $urandom_range(0, 1);
      for (int p = 0; p < P; p++) begin
        req[p] = V'($urandom) & V'($urandom);
        for (int v = 0; v < V; v++) route[p][v] = port_e'($urandom_range(0, P - 1));
      end
      #1;
      // stage 1
      for (int p = 0; p < P; p++) begin
        int st;
        st = rot ? ptr[p] : 0;
        w1[p] = -1;
        for (int k = 0; k < V; k++) if (w1[p] < 0 && req[p][(st + k) % V]) w1[p] = (st + k) % V;
      end
      // stage 2
      for (int o = 0; o < P; o++) begin
        w2[o] = -1; pos2[o] = -1;
        for (int k = 0; k < P; k++) begin
          int c;
          c = rot ? ord[o][k] : k;
          if (w2[o] < 0 && w1[c] >= 0 && 32'(route[c][w1[c]]) == o) begin w2[o] = c; pos2[o] = k; end
        end
      end
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_en[o] != (w2[o] >= 0) || (w2[o] >= 0 && 32'(out_sel[o]) != w2[o])) begin
          failures++; $display("FAIL cycle %0d output %0d en=%b sel=%0d expected %0d", i, o, out_en[o], out_sel[o], w2[o]);
        end
      end
      for (int p = 0; p < P; p++) begin
        logic e;
        e = 0;
        for (int o = 0; o < P; o++) if (w2[o] == p) e = 1;
        checks++;
        if (in_gnt[p] != e || (e && 32'(in_vc[p]) != w1[p]) || s1_any[p] != (req[p] != 0)) begin
          failures++; $display("FAIL cycle %0d input %0d gnt=%b vc=%0d expected %b/%0d", i, p, in_gnt[p], in_vc[p], e, w1[p]);
        end
        if (w1[p] >= 0 && !e) n_lost++;
        if (rot && e) ptr[p] = (w1[p] + 1) % V;
      end
      if (rot) begin
        for (int o = 0; o < P; o++) if (w2[o] >= 0) begin
          ord[o].delete(pos2[o]);
          ord[o].push_back(w2[o]);
        end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_lost == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
