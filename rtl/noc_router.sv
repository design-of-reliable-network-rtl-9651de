// noc_router: five-port store-and-forward packet router of the mesh.
//
// Every port (local, north, east, south, west) has an input FIFO and an output
// FIFO, so congestion is absorbed on both sides of the switch. A packet is one
// word; it moves on only when the next buffer has room for all of it.
//
//   input link -> input FIFO -> head register -> XY routing -> request
//   per output: round robin arbiter over the five inputs -> crossbar ->
//   output FIFO -> output register -> output link
//
// Each FIFO's data_out register holds its head packet; a flag per FIFO says
// whether that register holds a packet not yet passed on. The routing logic
// reads the destination from the input head packet and raises a request to
// one output. That output's arbiter grants one requesting input per cycle
// when the output FIFO is not full; the crossbar writes the granted packet into
// the output FIFO and the input FIFO loads its next packet into the head
// register in the same cycle. Output FIFOs drive their link with a valid/ready
// handshake: out_valid stays high and out_pkt stable until out_ready is seen.
// in_ready is high while the input FIFO is not full.
//
// Timing at zero load: 4 clock cycles from a packet's acceptance on an input
// link to its acceptance on the next link (FIFO write, head load, switch into
// the output FIFO, output register load). Throughput: one packet per cycle
// per output port.
//
// From the document: input and output buffering with FIFOs, shortest-path
// routing, a rotating priority (round robin) arbiter that reads the addresses
// from the buffer output and steers the input data to the output port,
// store-and-forward flow. Own choices: the FIFO depth, XY routing, the
// valid/ready link handshake and the head-register pipeline.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned X     = 0,   // this router's column
  parameter int unsigned Y     = 0,   // this router's row
  parameter int unsigned DEPTH = 4    // words per FIFO
) (
  input  logic    clk,
  input  logic    rst,
  input  packet_t in_pkt    [NPORTS],
  input  logic    in_valid  [NPORTS],
  output logic    in_ready  [NPORTS],
  output packet_t out_pkt   [NPORTS],
  output logic    out_valid [NPORTS],
  input  logic    out_ready [NPORTS]
);

  localparam int unsigned N = NPORTS;

  // ---------------- input side ----------------
  logic         in_full   [N];
  logic         in_empty  [N];
  logic         in_rd     [N];
  logic         head_vld  [N];
  logic         in_gnt    [N];
  packet_t      head      [N];
  logic [PKT_W-1:0] head_bits [N];
  port_e        route     [N];

  // ---------------- switch ----------------
  logic [N-1:0] req       [N];   // req[output][input]
  logic [N-1:0] arb_gnt   [N];
  logic [N-1:0] gnt       [N];   // grants that are used (output FIFO has room)
  packet_t      xb_pkt    [N];
  logic [N-1:0] xb_vld;

  // ---------------- output side ----------------
  logic         o_full    [N];
  logic         o_empty   [N];
  logic         o_rd      [N];
  logic         ohead_vld [N];
  logic [PKT_W-1:0] ohead_bits [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign in_ready[i] = !in_full[i];

    noc_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_in_fifo (
      .clk         (clk),
      .rst         (rst),
      .write_enable(in_valid[i] && !in_full[i]),
      .read_enable (in_rd[i]),
      .data_in     (in_pkt[i]),
      .full        (in_full[i]),
      .empty       (in_empty[i]),
      .data_out    (head_bits[i])
    );
    assign head[i] = packet_t'(head_bits[i]);

    // Load the next packet when the head register is free or being emptied.
    assign in_rd[i] = !in_empty[i] && (!head_vld[i] || in_gnt[i]);

    always_ff @(posedge clk) begin
      if (rst)           head_vld[i] <= 1'b0;
      else if (in_rd[i]) head_vld[i] <= 1'b1;
      else if (in_gnt[i]) head_vld[i] <= 1'b0;
    end

    xy_route u_route (
      .cur_x   (COORD_W'(X)),
      .cur_y   (COORD_W'(Y)),
      .dst_x   (head[i].dst_x),
      .dst_y   (head[i].dst_y),
      .out_port(route[i])
    );
  end

  always_comb begin
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++)
        req[o][i] = head_vld[i] && (route[i] == port_e'(o));
  end

  for (genvar o = 0; o < N; o++) begin : g_arb
    rr_arbiter #(.N(N)) u_arb (
      .clk    (clk),
      .rst    (rst),
      .req    (req[o]),
      .advance(!o_full[o]),
      .grant  (arb_gnt[o])
    );
    assign gnt[o] = o_full[o] ? '0 : arb_gnt[o];
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_gnt[i] = 1'b0;
      for (int o = 0; o < N; o++) in_gnt[i] = in_gnt[i] | gnt[o][i];
    end
  end

  noc_crossbar #(.N(N)) u_xbar (
    .in_pkt   (head),
    .sel      (gnt),
    .out_pkt  (xb_pkt),
    .out_valid(xb_vld)
  );

  for (genvar o = 0; o < N; o++) begin : g_out
    noc_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_out_fifo (
      .clk         (clk),
      .rst         (rst),
      .write_enable(xb_vld[o]),
      .read_enable (o_rd[o]),
      .data_in     (xb_pkt[o]),
      .full        (o_full[o]),
      .empty       (o_empty[o]),
      .data_out    (ohead_bits[o])
    );

    assign o_rd[o] = !o_empty[o] && (!ohead_vld[o] || out_ready[o]);

    always_ff @(posedge clk) begin
      if (rst)                ohead_vld[o] <= 1'b0;
      else if (o_rd[o])       ohead_vld[o] <= 1'b1;
      else if (out_ready[o])  ohead_vld[o] <= 1'b0;
    end

    assign out_valid[o] = ohead_vld[o];
    assign out_pkt[o]   = packet_t'(ohead_bits[o]);

    // Link handshake: a packet offered stays offered, unchanged, until taken.
    a_hold: assert property (@(posedge clk) disable iff (rst)
      out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_pkt[o]));
  end

  // Each input is granted by at most one output.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_one_output: assert property (@(posedge clk) disable iff (rst)
      $onehot0({gnt[0][i], gnt[1][i], gnt[2][i], gnt[3][i], gnt[4][i]}));
  end

endmodule
