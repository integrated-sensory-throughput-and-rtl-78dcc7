// crossbar: the I x O crossbar switch of the router (switch traversal).
//
// Each output selects the link word of one input, chosen by the switch
// allocator, so at most one flit passes through each output per cycle and
// the same input may not be sent to two outputs. An output that is not
// enabled carries an invalid word. Purely combinational; the link register
// behind it sits in the output port. Interface: in_link[P], sel[P] (input
// index per output), en[P], out_link[P].
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS
) (
  input  link_t                     in_link [P],
  input  logic [$clog2(P)-1:0]      sel     [P],
  input  logic [P-1:0]              en,
  output link_t                     out_link[P]
);
  always_comb begin
    for (int o = 0; o < P; o++) begin
      out_link[o] = '0;
      if (en[o]) begin
        out_link[o]       = in_link[sel[o]];
        out_link[o].valid = 1'b1;
      end
    end
  end
endmodule
