// xy_route: routing logic of a router, purely combinational.
//
// Dimension-ordered (XY) routing: a packet first travels east or west until
// its column matches the destination column, then north or south until the row
// matches, and leaves on the local port at its destination. Every packet thus
// takes a shortest path (the Manhattan distance) and the order of turns rules
// out routing deadlock. The router's own position comes in on ports so the
// same logic serves every router of the mesh.
//
// The document asks for shortest-path routing; the XY algorithm is this
// design's choice of one.
module xy_route
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);

  always_comb begin
    if      (dst_x > cur_x) out_port = PORT_EAST;
    else if (dst_x < cur_x) out_port = PORT_WEST;
    else if (dst_y > cur_y) out_port = PORT_SOUTH;
    else if (dst_y < cur_y) out_port = PORT_NORTH;
    else                    out_port = PORT_LOCAL;
  end

endmodule
