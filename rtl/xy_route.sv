// xy_route: routing computation of a router, dimension-ordered (X-Y) routing.
//
// A packet first travels along X until its destination column is reached, then
// along Y; it leaves through the Local port at its destination. X-Y routing is
// the routing of the design description; East = +X and North = +Y are this
// design's orientation. Purely combinational: `out_port` follows the inputs in
// the same cycle, as a 3-bit port code of noc_pkg.
module xy_route
  import noc_pkg::*;
(
  input  coord_t cur_x,
  input  coord_t cur_y,
  input  coord_t dst_x,
  input  coord_t dst_y,
  output port_e  out_port
);

  always_comb begin
    if      (dst_x > cur_x) out_port = P_EAST;
    else if (dst_x < cur_x) out_port = P_WEST;
    else if (dst_y > cur_y) out_port = P_NORTH;
    else if (dst_y < cur_y) out_port = P_SOUTH;
    else                    out_port = P_LOCAL;
  end

endmodule
