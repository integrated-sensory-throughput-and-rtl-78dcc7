// prio_cell: one priority cell of the ring arbiter.
//
// A request is granted when the cell holds the priority token (pr) or when
// the carry from the cell before it (kin) says that no cell with higher
// priority has taken the grant. The carry passes on (kout) only when this
// cell does not request:
//   gnt  = req & (pr | kin)
//   kout = ~req & (pr | kin)
// The grant equation follows the source article's round-robin cell; the source article's
// printed carry equation is read together with its cell drawing, where the
// carry leaves through a gate fed by the inverted request. Purely
// combinational.
module prio_cell (
  input  logic req,
  input  logic pr,
  input  logic kin,
  output logic gnt,
  output logic kout
);
  logic live;
  assign live = pr | kin;
  assign gnt  = req & live;
  assign kout = ~req & live;
endmodule
