// noc_mesh: the packet switching network, a ROWS x COLS mesh of routers.
//
// Router (x, y) sits in column x and row y. Neighbouring routers are joined by
// a pair of physical links, one each way, each carrying a packet word with a
// valid/ready handshake. Each router's local port is brought out on the top
// ports at index y*COLS + x; a core (or its network interface) injects packets
// on in_* and takes delivered packets from out_*. A packet's dst_x/dst_y pick
// the router whose local port delivers it, and it travels there along an XY
// shortest path, 4 clock cycles per router at zero load: a packet accepted on
// in_* at edge t is offered on out_* of a router H hops away from edge
// t + 4*(H+1) - 1 on.
//
// Links that would leave the mesh edge are tied off: nothing arrives on them,
// and they accept and drop anything sent out, which XY routing never does for
// a destination inside the mesh.
//
// From the document: the 4x4 grid of routers, each with its core attached,
// joined by physical links. Own choices: the link handshake, the numbering of
// the local ports and the edge tie-off.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  packet_t in_pkt    [ROWS*COLS],
  input  logic    in_valid  [ROWS*COLS],
  output logic    in_ready  [ROWS*COLS],
  output packet_t out_pkt   [ROWS*COLS],
  output logic    out_valid [ROWS*COLS],
  input  logic    out_ready [ROWS*COLS]
);

  localparam int unsigned NN = ROWS*COLS;

  // Per-router port bundles, [node][port].
  packet_t r_in_pkt   [NN][NPORTS];
  logic    r_in_vld   [NN][NPORTS];
  logic    r_in_rdy   [NN][NPORTS];
  packet_t r_out_pkt  [NN][NPORTS];
  logic    r_out_vld  [NN][NPORTS];
  logic    r_out_rdy  [NN][NPORTS];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned ID = y*COLS + x;

      noc_router #(.X(x), .Y(y), .DEPTH(DEPTH)) u_router (
        .clk      (clk),
        .rst      (rst),
        .in_pkt   (r_in_pkt[ID]),
        .in_valid (r_in_vld[ID]),
        .in_ready (r_in_rdy[ID]),
        .out_pkt  (r_out_pkt[ID]),
        .out_valid(r_out_vld[ID]),
        .out_ready(r_out_rdy[ID])
      );

      // Local port.
      assign r_in_pkt[ID][PORT_LOCAL]  = in_pkt[ID];
      assign r_in_vld[ID][PORT_LOCAL]  = in_valid[ID];
      assign in_ready[ID]              = r_in_rdy[ID][PORT_LOCAL];
      assign out_pkt[ID]               = r_out_pkt[ID][PORT_LOCAL];
      assign out_valid[ID]             = r_out_vld[ID][PORT_LOCAL];
      assign r_out_rdy[ID][PORT_LOCAL] = out_ready[ID];

      // North link: to/from router (x, y-1), whose south port faces us.
      if (y > 0) begin : g_n
        assign r_in_pkt[ID][PORT_NORTH]  = r_out_pkt[ID-COLS][PORT_SOUTH];
        assign r_in_vld[ID][PORT_NORTH]  = r_out_vld[ID-COLS][PORT_SOUTH];
        assign r_out_rdy[ID][PORT_NORTH] = r_in_rdy[ID-COLS][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in_pkt[ID][PORT_NORTH]  = '0;
        assign r_in_vld[ID][PORT_NORTH]  = 1'b0;
        assign r_out_rdy[ID][PORT_NORTH] = 1'b1;
      end

      // South link: to/from router (x, y+1).
      if (y < ROWS-1) begin : g_s
        assign r_in_pkt[ID][PORT_SOUTH]  = r_out_pkt[ID+COLS][PORT_NORTH];
        assign r_in_vld[ID][PORT_SOUTH]  = r_out_vld[ID+COLS][PORT_NORTH];
        assign r_out_rdy[ID][PORT_SOUTH] = r_in_rdy[ID+COLS][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in_pkt[ID][PORT_SOUTH]  = '0;
        assign r_in_vld[ID][PORT_SOUTH]  = 1'b0;
        assign r_out_rdy[ID][PORT_SOUTH] = 1'b1;
      end

      // East link: to/from router (x+1, y).
      if (x < COLS-1) begin : g_e
        assign r_in_pkt[ID][PORT_EAST]  = r_out_pkt[ID+1][PORT_WEST];
        assign r_in_vld[ID][PORT_EAST]  = r_out_vld[ID+1][PORT_WEST];
        assign r_out_rdy[ID][PORT_EAST] = r_in_rdy[ID+1][PORT_WEST];
      end else begin : g_e_edge
        assign r_in_pkt[ID][PORT_EAST]  = '0;
        assign r_in_vld[ID][PORT_EAST]  = 1'b0;
        assign r_out_rdy[ID][PORT_EAST] = 1'b1;
      end

      // West link: to/from router (x-1, y).
      if (x > 0) begin : g_w
        assign r_in_pkt[ID][PORT_WEST]  = r_out_pkt[ID-1][PORT_EAST];
        assign r_in_vld[ID][PORT_WEST]  = r_out_vld[ID-1][PORT_EAST];
        assign r_out_rdy[ID][PORT_WEST] = r_in_rdy[ID-1][PORT_EAST];
      end else begin : g_w_edge
        assign r_in_pkt[ID][PORT_WEST]  = '0;
        assign r_in_vld[ID][PORT_WEST]  = 1'b0;
        assign r_out_rdy[ID][PORT_WEST] = 1'b1;
      end
    end
  end

  initial begin
    assert (ROWS <= (1 << COORD_W) && COLS <= (1 << COORD_W))
      else $error("mesh larger than the packet's coordinate fields can address");
  end

endmodule
