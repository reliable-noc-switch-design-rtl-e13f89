// rkt_pkg: types and constants shared by the RKT switch.
//
// A packet is a single 16-bit word, stored and forwarded whole. Its layout
// follows the packet structure of the design: the two URPI (Unique Routing
// Path Indication) bits in positions 16-15 (bits [15:14]), then the previous
// Y and X coordinates, the destination Y and X coordinates, and the payload.
// Coordinates are 3 bits each, which leaves 2 payload bits; the coordinate
// width is this design's choice (a 3-bit field holds the values 0..7 seen on
// the coordinate signals of the routing logic).
//
// Ports are numbered North=0, East=1, South=2, West=3 (own choice). Masks of
// four bits use the same numbering, bit i for port i.
package rkt_pkg;

  localparam int unsigned FLIT_W  = 16;
  localparam int unsigned COORD_W = 3;
  localparam int unsigned DATA_W  = FLIT_W - 2 - 4 * COORD_W;
  localparam int unsigned NPORTS  = 4;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic [1:0]        urpi;
    coord_t            y_prev;
    coord_t            x_prev;
    coord_t            y_dest;
    coord_t            x_dest;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // URPI values: set (11) when exactly one output port can be used, else 00.
  localparam logic [1:0] URPI_NONE   = 2'b00;
  localparam logic [1:0] URPI_UNIQUE = 2'b11;

  typedef enum logic [1:0] {
    ST_TRANSMIT = 2'd0,
    ST_RECEIVE  = 2'd1,
    ST_LOOPBACK = 2'd2
  } port_state_e;

  // rw control codes of a port FSM.
  localparam logic [1:0] RW_TRANSMIT = 2'b10;
  localparam logic [1:0] RW_RECEIVE  = 2'b01;

  // True when exactly one bit of a port mask is set.
  function automatic logic one_port(input logic [3:0] m);
    return (m != 4'b0000) && ((m & (m - 4'd1)) == 4'b0000);
  endfunction

endpackage
