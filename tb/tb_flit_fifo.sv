// tb_flit_fifo: self-checking testbench of the flit buffer.
//
// Random pushes (never when full) and pops (never when empty), including
// both in one cycle, are mirrored in a queue; the head word, the count and
// the empty and full flags are compared with the queue every cycle.
module tb_flit_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 32, D = 4;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [2:0] count;
  logic [W-1:0] q[$];
  int n_full = 0;

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || 32'(count) != q.size()) begin
        failures++; $display("FAIL flags empty=%0d full=%0d count=%0d model=%0d", empty, full, count, q.size());
      end
      if (q.size() != 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("FAIL dout %h expected %h", dout, q[0]); end
      end
      if (q.size() == D) n_full++;
      pop  = (q.size() != 0) && ($urandom_range(0, 2) == 0 || i % 2000 > 1500);
      push = (q.size() != D || pop) && ($urandom_range(0, 1) == 0 || i % 2000 < 500) && !(i % 2000 > 1500 && $urandom_range(0,1) == 0);
      din  = $urandom;
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
