// noc_pkg: types and constants shared by the self-healing mesh NoC.
//
// A packet is one 67-bit word: the 64-bit packet of seven fields (destination
// X/Y, source X/Y, sequence number, transmission time, payload) followed by the
// three routing bits that steer it through a faulty router. The routing bits sit
// in the last (least significant) three bits. The seven fields and their order
// follow the design description; the field widths are this design's choice
// (2-bit coordinates for a 4x4 mesh, 8-bit sequence number, 16-bit time stamp,
// 32-bit payload, which add up to 64 bits).
//
// Port codes use the 3-bit encoding of the routing bits and of the recovery
// multiplexer select: 000 Local, 001 East, 010 West, 011 North, 100 South,
// 101 Spare. North is the +Y direction, East the +X direction.
package noc_pkg;

  localparam int unsigned COORD_W   = 2;   // bits per mesh coordinate
  localparam int unsigned SEQ_W     = 8;
  localparam int unsigned TIME_W    = 16;
  localparam int unsigned PAYLOAD_W = 32;
  localparam int unsigned RBITS_W   = 3;

  localparam int unsigned NPORT = 5;       // Local, East, West, North, South
  localparam int unsigned NBUF  = 6;       // five port buffers plus the spare buffer

  typedef enum logic [RBITS_W-1:0] {
    P_LOCAL = 3'b000,
    P_EAST  = 3'b001,
    P_WEST  = 3'b010,
    P_NORTH = 3'b011,
    P_SOUTH = 3'b100,
    P_SPARE = 3'b101
  } port_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t                 dst_x;
    coord_t                 dst_y;
    coord_t                 src_x;
    coord_t                 src_y;
    logic [SEQ_W-1:0]       seq;
    logic [TIME_W-1:0]      tstamp;
    logic [PAYLOAD_W-1:0]   payload;
    logic [RBITS_W-1:0]     rbits;
  } packet_t;

endpackage
