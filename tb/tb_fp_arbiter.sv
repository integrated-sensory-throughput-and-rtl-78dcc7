// tb_fp_arbiter: self-checking testbench of the flexible ring arbiter.
//
// Two arbiters (4 and 7 requesters) get random requests, a random
// fixed/rotating mode and a random update enable every cycle. A reference
// model keeps its own round-robin pointer: in fixed mode the lowest
// requesting index must win; in rotating mode the first requester at or
// after the pointer must win, and an accepted grant moves the pointer to the
// next index. Grants are combinational, so they are compared in the same
// cycle, before the clock edge.
module tb_fp_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NA = 4, NB = 7;
  logic rot, upd;
  logic [NA-1:0] req_a, gnt_a;
  logic [NB-1:0] req_b, gnt_b;
  logic any_a, any_b;
  int ptr_a, ptr_b, n_rot_grants;

  fp_arbiter #(.N(NA)) dut_a (.clk, .rst_n, .rotate(rot), .upd, .req(req_a), .gnt(gnt_a), .any_gnt(any_a));
  fp_arbiter #(.N(NB)) dut_b (.clk, .rst_n, .rotate(rot), .upd, .req(req_b), .gnt(gnt_b), .any_gnt(any_b));

  function automatic int pick(int n, logic [31:0] r, int start);
    for (int k = 0; k < n; k++) if (r[(start + k) % n]) return (start + k) % n;
    return -1;
  endfunction

  task automatic check(int n, logic [31:0] r, logic [31:0] g, logic any, int ptr, string name);
    int w;
    w = rot ? pick(n, r, ptr) : pick(n, r, 0);
    checks++;
    if (w < 0) begin
      if (g != 0 || any) begin failures++; $display("FAIL %s: grant %b without request", name, g); end
    end else if (g != (32'd1 << w) || !any) begin
      failures++;
      $display("FAIL %s: req=%b rot=%0d ptr=%0d gnt=%b expected index %0d", name, r, rot, ptr, g, w);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rot = 0; upd = 0; req_a = 0; req_b = 0;
    ptr_a = 0; ptr_b = 0; n_rot_grants = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Directed: rotating, all request, always update: strict rotation 0,1,2,3,0
    rot = 1; upd = 1; req_a = '1; req_b = '0;
    for (int i = 0; i < 8; i++) begin
      #1;
      checks++;
      if (gnt_a != NA'(1 << (i % NA))) begin
        failures++; $display("FAIL rotation step %0d gnt=%b", i, gnt_a);
      end
      @(posedge clk); #1;
    end
    ptr_a = 0; // rotation has come round to index 0 again
    for (int i = 0; i < 20000; i++) begin
      rot   = ($urandom_range(0, 3) != 0);
      upd   = ($urandom_range(0, 4) != 0);
      req_a = NA'($urandom);
      req_b = NB'($urandom) & NB'($urandom);
      #1;
      check(NA, 32'(req_a), 32'(gnt_a), any_a, ptr_a, "A");
      check(NB, 32'(req_b), 32'(gnt_b), any_b, ptr_b, "B");
      if (rot && upd) begin
        int w;
        w = pick(NA, 32'(req_a), ptr_a); if (w >= 0) begin ptr_a = (w + 1) % NA; n_rot_grants++; end
        w = pick(NB, 32'(req_b), ptr_b); if (w >= 0) ptr_b = (w + 1) % NB;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_rot_grants < 1000) begin failures++; $display("FAIL too few rotating grants"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
