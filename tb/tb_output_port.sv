// tb_output_port: self-checking testbench of the output port state.
//
// A random stream of VC allocations, flits (only on busy VCs with credit)
// and returned credits (only where credits were taken) is mirrored in a
// model of busy bits and credit counters. vc_free and credit_ok are checked
// every cycle and the link must repeat the switch output one cycle later.
// Running out of credit and freeing a VC with a tail must both happen.
module tb_output_port;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int V = 4, D = 4;
  logic [V-1:0] alloc, vc_free, credit_ok;
  link_t xbar_in, link_out, last_in;
  credit_t credit_in;
  logic [V-1:0] busy;
  int cred [V];
  int n_dry = 0, n_free = 0;

  output_port #(.NUM_VC(V), .DEPTH(D)) dut (.clk, .rst_n, .alloc, .xbar_in, .credit_in, .vc_free, .credit_ok, .link_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc = 0; xbar_in = '0; credit_in = '0; busy = 0; last_in = '0;
    for (int v = 0; v < V; v++) cred[v] = D;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int sv, cv;
      // check state
      for (int v = 0; v < V; v++) begin
        checks++;
        if (vc_free[v] != !busy[v] || credit_ok[v] != (cred[v] > 0)) begin
          failures++; $display("FAIL vc %0d free=%b cred_ok=%b model busy=%b cred=%0d", v, vc_free[v], credit_ok[v], busy[v], cred[v]);
        end
        if (cred[v] == 0) n_dry++;
      end
      checks++;
      if (link_out != last_in) begin failures++; $display("FAIL link register"); end
      // stimulus
      alloc = 0; xbar_in = '0; credit_in = '0;
      sv = $urandom_range(0, V - 1);
      if (!busy[sv] && $urandom_range(0, 1) == 0) alloc[sv] = 1'b1;
      else if (busy[sv] && cred[sv] > 0 && $urandom_range(0, 1) == 0) begin
        xbar_in.valid = 1'b1; xbar_in.vc = VC_IDX_W'(sv);
        xbar_in.flit.ftype = ($urandom_range(0, 5) == 0) ? FT_TAIL : FT_BODY;
        xbar_in.flit.data = DATA_W'($urandom);
      end
      cv = $urandom_range(0, V - 1);
      if (cred[cv] < D && $urandom_range(0, 2) == 0) begin credit_in.valid = 1'b1; credit_in.vc = VC_IDX_W'(cv); end
      @(posedge clk); #1;
      last_in = xbar_in;
      if (alloc[sv]) busy[sv] = 1'b1;
      if (xbar_in.valid) begin
        cred[sv]--;
        if (xbar_in.flit.ftype == FT_TAIL) begin busy[sv] = 1'b0; n_free++; end
      end
      if (credit_in.valid) cred[cv]++;
    end
    checks++;
    if (n_dry == 0 || n_free == 0) begin failures++; $display("FAIL coverage dry=%0d free=%0d", n_dry, n_free); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
