// tb_fp_matrix_arbiter: self-checking testbench of the matrix arbiter.
//
// The reference model is a least-recently-served list, highest priority
// first, starting in the order 0,1,...,K-1. In fixed mode the lowest
// requesting index must win and the list must not change. In rotating mode
// the first requester in the list must win, and an accepted grant moves the
// winner to the end of the list.
module tb_fp_matrix_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int K = 5;
  logic rot, upd, any;
  logic [K-1:0] req, gnt;
  int ord[$];

  fp_matrix_arbiter #(.K(K)) dut (.clk, .rst_n, .rotate(rot), .upd, .req, .gnt, .any_gnt(any));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, pos;
    for (int i = 0; i < K; i++) ord.push_back(i);
    rot = 0; upd = 0; req = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Directed: all request in rotating mode gives 0,1,2,3,4,0,...
    rot = 1; upd = 1; req = '1;
    for (int i = 0; i < 2 * K; i++) begin
      #1; checks++;
      if (gnt != K'(1 << (i % K))) begin failures++; $display("FAIL rotation step %0d gnt=%b", i, gnt); end
      @(posedge clk); #1;
    end
    for (int i = 0; i < 20000; i++) begin
      rot = ($urandom_range(0, 3) != 0);
      upd = ($urandom_range(0, 4) != 0);
      req = K'($urandom);
      #1;
      w = -1; pos = -1;
      if (rot) begin
        for (int j = 0; j < K; j++) if (w < 0 && req[ord[j]]) begin w = ord[j]; pos = j; end
      end else begin
        for (int j = K - 1; j >= 0; j--) if (req[j]) w = j;
      end
      checks++;
      if (w < 0 ? (gnt != 0 || any) : (gnt != K'(1 << w) || !any)) begin
        failures++;
        $display("FAIL req=%b rot=%0d gnt=%b expected %0d", req, rot, gnt, w);
      end
      if (rot && upd && w >= 0) begin
        ord.delete(pos);
        ord.push_back(w);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
