// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// A packet is carried whole in one word (store-and-forward switching, no
// splitting into flits). Its header holds the source and destination mesh
// coordinates, followed by the payload byte. The router has five ports: the
// local core port and the four mesh directions.
//
// From the document: one-word packets under store-and-forward switching, a
// header with source and destination addresses, five-port routers in a mesh.
// Own choices: 2-bit coordinates (enough for the 4x4 mesh), an 8-bit payload,
// and the port numbering below. Row numbers grow towards the south, column
// numbers towards the east.
package noc_pkg;

  localparam int unsigned COORD_W = 2;   // bits per mesh coordinate
  localparam int unsigned DATA_W  = 8;   // payload bits per packet
  localparam int unsigned NPORTS  = 5;   // local + north + east + south + west

  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
    logic [DATA_W-1:0]  payload;
  } packet_t;

  localparam int unsigned PKT_W = $bits(packet_t);

endpackage
