// heal_rbits: routing-bit update done by a neighbour of a faulty router.
//
// A faulty router cannot compute routes, so the neighbour that sends it a packet
// does the computation for it and writes the answer into the packet's three
// routing bits: the port of the faulty router the packet must leave through.
// Following the design description, the neighbour compares the packet's
// destination with the faulty router's coordinate (fx, fy):
//   same coordinate            -> 000 Local
//   destination X lower        -> 010 West
//   destination X higher       -> 001 East
//   same X, destination Y higher -> 011 North
//   same X, destination Y lower  -> 100 South
// (the East case is not spelled out in the description and is taken as the
// mirror of the West case). When `stamp` is low the packet passes unchanged.
// Purely combinational.
module heal_rbits
  import noc_pkg::*;
(
  input  packet_t pkt_in,
  input  coord_t  fx,
  input  coord_t  fy,
  input  logic    stamp,
  output packet_t pkt_out
);

  port_e rb;

  always_comb begin
    if (pkt_in.dst_x == fx && pkt_in.dst_y == fy) rb = P_LOCAL;
    else if (pkt_in.dst_x < fx)                   rb = P_WEST;
    else if (pkt_in.dst_x > fx)                   rb = P_EAST;
    else if (pkt_in.dst_y > fy)                   rb = P_NORTH;
    else                                          rb = P_SOUTH;

    pkt_out = pkt_in;
    if (stamp) pkt_out.rbits = rb;
  end

endmodule
