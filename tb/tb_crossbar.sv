// tb_crossbar: self-checking testbench of the 5 x 5 crossbar.
//
// Random input words, selections and enables; every enabled output must
// carry the selected input's VC and flit with valid set, every other output
// must be all zero.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  link_t in_link [NUM_PORTS];
  link_t out_link[NUM_PORTS];
  logic [2:0] sel [NUM_PORTS];
  logic [NUM_PORTS-1:0] en;

  crossbar #(.P(NUM_PORTS)) dut (.in_link, .sel, .en, .out_link);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_link[p] = link_t'({$urandom, $urandom});
        sel[p] = 3'($urandom_range(0, NUM_PORTS - 1));
      end
      en = NUM_PORTS'($urandom);
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        link_t e;
        e = '0;
        if (en[o]) begin
          e = in_link[sel[o]];
          e.valid = 1'b1;
        end
        checks++;
        if (out_link[o] != e) begin failures++; $display("FAIL output %0d", o); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
