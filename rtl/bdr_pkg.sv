// bdr_pkg -- types and constants shared by the buffered deflection routing
// network: the flit format, the port numbering of a mesh router and the
// saturating age increment.
//
// A flit carries its destination and source coordinates, its age (the flit
// priority: clocks spent in the network since injection; older flits win) and
// a payload. The age travels in the flit header and is incremented once per
// clock by whichever register holds the flit (a router buffer or a link
// register), as the routing scheme prescribes. Field widths are this design's
// own choice: 3-bit coordinates cover the 8x8 mesh, a 12-bit age saturates at
// 4095 clocks, and the payload is 32 bits.
package bdr_pkg;

  localparam int unsigned COORD_W = 3;
  localparam int unsigned AGE_W   = 12;
  localparam int unsigned DATA_W  = 32;

  // Mesh ports of a router. Clockwise order N -> E -> S -> W is also the
  // rotation direction of the RING router's buffer groups.
  localparam int unsigned NPORTS = 4;
  localparam int unsigned PORT_N = 0;   // towards y-1
  localparam int unsigned PORT_E = 1;   // towards x+1
  localparam int unsigned PORT_S = 2;   // towards y+1
  localparam int unsigned PORT_W = 3;   // towards x-1

  // Bit NPORTS of a productive-port mask stands for the local ejection port.
  localparam int unsigned EJECT_BIT = NPORTS;

  // Router flavour of a mesh.
  typedef enum logic {
    ALGO_CENTRAL = 1'b0,
    ALGO_RING    = 1'b1
  } algo_e;

  typedef struct packed {
    logic               valid;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [AGE_W-1:0]   age;
    logic [DATA_W-1:0]  data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Copy of a flit one clock older; the age saturates instead of wrapping.
  function automatic flit_t age_step(flit_t f);
    flit_t r;
    r = f;
    if (f.valid && f.age != '1) r.age = f.age + 1'b1;
    return r;
  endfunction

endpackage
