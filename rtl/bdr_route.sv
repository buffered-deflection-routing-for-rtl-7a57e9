// bdr_route -- productive-port computation of a mesh router.
//
// A port is productive for a flit when leaving through it shortens the flit's
// distance to its destination. In a 2D mesh with minimal hop distance that is
// E/W when the destination column differs and N/S when the destination row
// differs, so a flit has one or two productive ports; a flit already at its
// destination has none, and the ejection bit is set instead. Purely
// combinational; an invalid flit gives an all-zero mask.
//
// Interface: cur_x/cur_y are the router's coordinates (x grows East, y grows
// South), f is the flit. prod[PORT_N..PORT_W] are the mesh ports and
// prod[EJECT_BIT] is local ejection.
module bdr_route
  import bdr_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  flit_t              f,
  output logic [NPORTS:0]    prod
);
  always_comb begin
    prod = '0;
    if (f.valid) begin
      prod[PORT_N]    = (f.dst_y < cur_y);
      prod[PORT_S]    = (f.dst_y > cur_y);
      prod[PORT_E]    = (f.dst_x > cur_x);
      prod[PORT_W]    = (f.dst_x < cur_x);
      prod[EJECT_BIT] = (f.dst_x == cur_x) && (f.dst_y == cur_y);
    end
  end
endmodule
