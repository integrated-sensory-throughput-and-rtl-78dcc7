// network_interface: network interface (NI) between a core and the local
// port of its router. It assembles outgoing packets into flits and takes
// incoming flits apart again.
//
// Transmit: the core offers a packet as a stream of 30-bit words with
// tx_valid, holding tx_dst_x/tx_dst_y and tx_len (number of words, at least
// one) steady for the whole packet. The NI takes the lowest-numbered free VC
// of the router's local input that has a credit, sends a head flit with the
// destination, its own coordinates and the length, and then one body flit
// per word, the last one typed as tail. tx_ready marks the cycles in which
// a word is taken; the NI stalls when the VC has no credit. VC busy bits and
// credits are kept by an output_port, whose link register drives the link.
//
// Receive: every flit from the router's local output is taken at once and
// its credit is returned the next cycle. A head flit records the source per
// VC; each body or tail flit is handed to the core on rx_* in the cycle
// after it arrives, with its source and rx_last on the tail. The core must
// accept a word every cycle. The source article gives only the NI's task of
// assembling and disassembling packets; the packet format, the VC choice
// and both handshakes are this design's.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VC    = 4,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // core, transmit
  input  logic               tx_valid,
  output logic               tx_ready,
  input  logic [COORD_W-1:0] tx_dst_x,
  input  logic [COORD_W-1:0] tx_dst_y,
  input  logic [LEN_W-1:0]   tx_len,
  input  logic [DATA_W-1:0]  tx_data,
  // core, receive
  output logic               rx_valid,
  output logic [DATA_W-1:0]  rx_data,
  output logic               rx_last,
  output logic [COORD_W-1:0] rx_src_x,
  output logic [COORD_W-1:0] rx_src_y,
  // router local port
  output link_t              inj_link,
  input  credit_t            inj_credit,
  input  link_t              ej_link,
  output credit_t            ej_credit
);
  typedef enum logic {TX_IDLE, TX_BODY} tx_state_e;

  tx_state_e           state_q;
  logic [VC_IDX_W-1:0] vc_q;
  logic [LEN_W-1:0]    left_q;
  logic [NUM_VC-1:0]   vc_free, credit_ok, alloc;
  logic [NUM_VC-1:0]   avail;
  logic [VC_IDX_W-1:0] pick;
  link_t               send;
  head_t               hd;

  assign avail = vc_free & credit_ok;

  always_comb begin
    pick = '0;
    for (int v = NUM_VC - 1; v >= 0; v--) if (avail[v]) pick = VC_IDX_W'(v);
  end

  always_comb begin
    hd       = '0;
    hd.dst_x = tx_dst_x;
    hd.dst_y = tx_dst_y;
    hd.src_x = COORD_W'(MY_X);
    hd.src_y = COORD_W'(MY_Y);
    hd.len   = tx_len;
  end

  always_comb begin
    send     = '0;
    alloc    = '0;
    tx_ready = 1'b0;
    unique case (state_q)
      TX_IDLE: if (tx_valid && avail != '0) begin
        send.valid  = 1'b1;
        send.vc     = pick;
        send.flit   = '{ftype: FT_HEAD, data: DATA_W'(hd)};
        alloc[pick] = 1'b1;
      end
      TX_BODY: if (tx_valid && credit_ok[vc_q]) begin
        tx_ready   = 1'b1;
        send.valid = 1'b1;
        send.vc    = vc_q;
        send.flit  = '{ftype: (left_q == LEN_W'(1)) ? FT_TAIL : FT_BODY, data: tx_data};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= TX_IDLE;
      vc_q    <= '0;
      left_q  <= '0;
    end else begin
      unique case (state_q)
        TX_IDLE: if (send.valid) begin
          state_q <= TX_BODY;
          vc_q    <= pick;
          left_q  <= tx_len;
        end
        TX_BODY: if (tx_ready) begin
          left_q <= left_q - 1'b1;
          if (left_q == LEN_W'(1)) state_q <= TX_IDLE;
        end
        default: state_q <= TX_IDLE;
      endcase
    end
  end

  output_port #(.NUM_VC(NUM_VC), .DEPTH(BUF_DEPTH)) u_tx (
    .clk, .rst_n, .alloc, .xbar_in (send), .credit_in (inj_credit),
    .vc_free, .credit_ok, .link_out (inj_link)
  );

  // Receive side: per-VC source of the packet in flight.
  logic [COORD_W-1:0] src_x_q [NUM_VC];
  logic [COORD_W-1:0] src_y_q [NUM_VC];
  head_t              ej_hd;

  assign ej_hd = head_t'(ej_link.flit.data);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ej_credit <= '0;
      rx_valid  <= 1'b0;
      rx_data   <= '0;
      rx_last   <= 1'b0;
      rx_src_x  <= '0;
      rx_src_y  <= '0;
      for (int v = 0; v < NUM_VC; v++) begin
        src_x_q[v] <= '0;
        src_y_q[v] <= '0;
      end
    end else begin
      ej_credit <= '{valid: ej_link.valid, vc: ej_link.vc};
      rx_valid  <= ej_link.valid && !is_head(ej_link.flit);
      rx_data   <= ej_link.flit.data;
      rx_last   <= is_tail(ej_link.flit);
      rx_src_x  <= src_x_q[ej_link.vc];
      rx_src_y  <= src_y_q[ej_link.vc];
      if (ej_link.valid && is_head(ej_link.flit)) begin
        src_x_q[ej_link.vc] <= ej_hd.src_x;
        src_y_q[ej_link.vc] <= ej_hd.src_y;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == TX_IDLE && tx_valid) |-> tx_len != '0);
endmodule
