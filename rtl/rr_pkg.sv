// rr_pkg - types and constants shared by the reconfigurable-buffer router.
//
// A flit is DATA_W payload bits plus two framing bits: bop marks the header
// (first flit of a packet), eop marks the tail (last flit). A flit with both
// set is a one-flit packet; a flit with neither is payload. The two framing
// bits follow the router description; the 8-bit data width and the bop/eop
// encoding are this design's choice.
//
// Ports are numbered Local, North, East, South, West. The four mesh channels
// form a ring for buffer lending: going to the "right" from South gives East,
// then North, then West, then South again. Channel arrays of size 4 are
// indexed with the mesh ports in order N=0, E=1, S=2, W=3, so that
// right(j) = (j+3) mod 4 and left(j) = (j+1) mod 4.
package rr_pkg;

  localparam int unsigned DATA_W    = 8;
  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned NUM_RING  = 4;

  typedef struct packed {
    logic              bop;   // header flit
    logic              eop;   // tail flit
    logic [DATA_W-1:0] data;  // header: {dx[3:0], dy[3:0]} signed offsets
  } flit_t;


  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  // Regions of a bank (and segments of a channel's logical queue).
  // Bank view: SEG_OWN = kept by owner, SEG_RIGHT = lent to the left
  // neighbour (who sees it as its right-hand borrow), SEG_LEFT = lent to the
  // right neighbour. Channel view: SEG_OWN = own bank, SEG_RIGHT = slots
  // borrowed from the right neighbour, SEG_LEFT = from the left neighbour.
  localparam int unsigned SEG_OWN   = 0;
  localparam int unsigned SEG_RIGHT = 1;
  localparam int unsigned SEG_LEFT  = 2;

  function automatic int unsigned ring_right(int unsigned j);
    return (j + 3) % 4;
  endfunction

  function automatic int unsigned ring_left(int unsigned j);
    return (j + 1) % 4;
  endfunction

endpackage
