// flit_fifo: first-in first-out flit buffer, one per virtual channel of an
// input port (the FIFO_north ... FIFO_buffer blocks of the router).
//
// A circular buffer of DEPTH words of WIDTH bits with read and write
// pointers and an occupancy counter. The head word is always visible on
// dout (first-word fall-through). Push and pop in the same cycle are
// allowed. Push when full and pop when empty are protocol errors and are
// checked by assertions; credit flow control upstream keeps them from
// happening. The default of four 32-bit words follows the four 32-bit
// buffers per input port of the evaluated network; reading them as one
// buffer of four words per VC is this design's choice.
module flit_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      push,
  input  logic [WIDTH-1:0]          din,
  input  logic                      pop,
  output logic [WIDTH-1:0]          dout,
  output logic                      empty,
  output logic                      full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign dout  = mem[rd_q];
  assign empty = (cnt_q == '0);
  assign full  = (32'(cnt_q) == DEPTH);
  assign count = cnt_q;

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + $bits(cnt_q)'(push) - $bits(cnt_q)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
