// noc_pkg: types and constants shared by the router, the allocators and the
// network interface of the flexible-priority mesh network-on-chip.
//
// Ports are numbered in the order of the router's input buffers (north,
// south, east, west, then the local core port). A flit is 32 bits: a 2-bit
// type and a 30-bit field. A head flit carries the destination and source
// mesh coordinates and the number of body words that follow. Body and tail
// flits carry 30 data bits. The virtual channel (VC) number travels beside
// the flit on the link, not inside it. The 32-bit flit width follows the
// 32-bit input buffers of the evaluated network; the field layout, the
// port numbering and the side-band VC number are this design's own choices.
package noc_pkg;

  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned PORT_IDX_W = 3;
  localparam int unsigned FLIT_W    = 32;
  localparam int unsigned DATA_W    = 30;
  localparam int unsigned COORD_W   = 2;   // mesh up to 4 x 4
  localparam int unsigned VC_IDX_W  = 3;   // up to 8 virtual channels
  localparam int unsigned MAX_VC    = 8;
  localparam int unsigned LEN_W     = 8;

  typedef enum logic [PORT_IDX_W-1:0] {
    PORT_N = 3'd0,
    PORT_S = 3'd1,
    PORT_E = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_HEAD   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11   // head and tail in one flit
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Layout of the data field of a head flit.
  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [LEN_W-1:0]   len;      // body words that follow the head
    logic [DATA_W-4*COORD_W-LEN_W-1:0] tag;
  } head_t;

  // One link direction: a flit, its VC and a valid bit.
  typedef struct packed {
    logic                valid;
    logic [VC_IDX_W-1:0] vc;
    flit_t               flit;
  } link_t;

  // Credit returned upstream when a flit leaves a VC buffer.
  typedef struct packed {
    logic                valid;
    logic [VC_IDX_W-1:0] vc;
  } credit_t;

  // Per-cycle events of one router, for observation.
  typedef struct packed {
    logic rotate;        // arbiters in rotating priority this cycle
    logic sa_conflict;   // an input port lost switch allocation
    logic va_conflict;   // an input VC waited for an output VC
    logic credit_stall;  // a flit waited for a downstream credit
  } router_stat_t;

  function automatic logic is_head(flit_t f);
    return f.ftype == FT_HEAD || f.ftype == FT_SINGLE;
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.ftype == FT_TAIL || f.ftype == FT_SINGLE;
  endfunction

endpackage
