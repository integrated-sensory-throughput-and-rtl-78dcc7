// tb_traffic_estimator: self-checking testbench of the load estimator.
//
// Random request and neighbour-load vectors are applied; the load count
// must equal the number of set bits, and one cycle later the mode must be
// rotating exactly when that count reached the threshold (3). Both modes
// and both mode changes must be seen.
module tb_traffic_estimator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] req, prev;
  logic [3:0] load;
  logic rotate, expect_rot, last_rot;
  int n_up = 0, n_down = 0;

  traffic_estimator #(.NREQ(5), .NPREV(5), .THRESH(3)) dut (
    .clk, .rst_n, .req, .prev_load(prev), .load, .rotate);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; prev = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (rotate) begin failures++; $display("FAIL rotating after reset"); end
    last_rot = 0;
    for (int i = 0; i < 5000; i++) begin
      int cnt;
      req  = 5'($urandom) & 5'($urandom);
      prev = 5'($urandom) & 5'($urandom) & 5'($urandom);
      #1;
      cnt = $countones(req) + $countones(prev);
      checks++;
      if (32'(load) != cnt) begin failures++; $display("FAIL load %0d expected %0d", load, cnt); end
      expect_rot = (cnt >= 3);
      @(posedge clk); #1;
      checks++;
      if (rotate != expect_rot) begin failures++; $display("FAIL rotate=%0d expected %0d", rotate, expect_rot); end
      if (rotate && !last_rot) n_up++;
      if (!rotate && last_rot) n_down++;
      last_rot = rotate;
    end
    checks++;
    if (n_up == 0 || n_down == 0) begin failures++; $display("FAIL mode changes up=%0d down=%0d", n_up, n_down); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
