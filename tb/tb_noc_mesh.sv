// tb_noc_mesh: end-to-end test of the 4x4 mesh network at its default size.
//
// Sixteen cores inject packets on the local ports and sixteen sinks take
// them, all with the valid/ready rule. The test has four phases:
//   1. zero-load latency: single packets over 0 to 6 hops, checked against
//      4*(hops+1) cycles between the injection and delivery handshakes;
//   2. uniform random traffic with sinks that are often not ready;
//   3. hotspot traffic, every core sending to one node, which saturates the
//      links into it and makes the FIFOs fill and push back;
//   4. drain, after which every packet must have been delivered.
// A scoreboard keeps one in-order queue per source-destination pair (XY
// routing gives every pair a single path, so order is kept) and checks each
// delivered packet's node, contents and order. Counted mechanisms, each of
// which must occur: arbitration contention in a router, back-pressure on a
// local port, back-pressure on an inter-router link, a sink stall, and link
// traffic in each of the four directions.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int unsigned ROWS = 4, COLS = 4, NN = ROWS*COLS;

  logic clk = 1'b0;
  logic rst;
  packet_t in_pkt    [NN];
  logic    in_valid  [NN];
  logic    in_ready  [NN];
  packet_t out_pkt   [NN];
  logic    out_valid [NN];
  logic    out_ready [NN];

  noc_mesh dut (
    .clk(clk), .rst(rst),
    .in_pkt(in_pkt), .in_valid(in_valid), .in_ready(in_ready),
    .out_pkt(out_pkt), .out_valid(out_valid), .out_ready(out_ready)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int sent = 0, received = 0;
  int n_contention = 0, n_local_bp = 0, n_link_bp = 0, n_stall = 0;
  int n_dir [NPORTS] = '{default: 0};
  int mode = 0;            // 0 idle, 1 uniform, 2 hotspot
  int offer_pct = 0, ready_pct = 100;
  int hotspot = 5;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Scoreboard: queue per destination*NN + source.
  packet_t exp_q [NN*NN][$];

  always @(posedge clk) if (!rst) begin
    for (int n = 0; n < NN; n++) begin
      if (in_valid[n] && !in_ready[n]) n_local_bp++;
      if (out_valid[n] && !out_ready[n]) n_stall++;
      if (in_valid[n] && in_ready[n]) begin
        int d;
        d = int'(in_pkt[n].dst_y) * COLS + int'(in_pkt[n].dst_x);
        exp_q[d*NN + n].push_back(in_pkt[n]);
        sent++;
      end
      if (out_valid[n] && out_ready[n]) begin
        int s;
        s = int'(out_pkt[n].src_y) * COLS + int'(out_pkt[n].src_x);
        checks++;
        if (int'(out_pkt[n].dst_y) * COLS + int'(out_pkt[n].dst_x) != n) begin
          failures++;
          $display("FAIL packet %h delivered at node %0d", out_pkt[n], n);
        end else if (exp_q[n*NN + s].size() == 0 || exp_q[n*NN + s][0] != out_pkt[n]) begin
          failures++;
          $display("FAIL packet %h at node %0d out of order or unexpected", out_pkt[n], n);
        end else begin
          void'(exp_q[n*NN + s].pop_front());
        end
        received++;
      end
    end
  end

  // Per-router monitors: contention, link back-pressure, link traffic.
  for (genvar y = 0; y < ROWS; y++) begin : g_my
    for (genvar x = 0; x < COLS; x++) begin : g_mx
      always @(posedge clk) if (!rst) begin
        for (int o = 0; o < NPORTS; o++) begin
          if ($countones(dut.g_row[y].g_col[x].u_router.req[o]) > 1) n_contention++;
          if (o != int'(PORT_LOCAL) &&
              dut.g_row[y].g_col[x].u_router.out_valid[o] &&
              dut.g_row[y].g_col[x].u_router.out_ready[o]) n_dir[o]++;
          if (o != int'(PORT_LOCAL) &&
              dut.g_row[y].g_col[x].u_router.in_valid[o] &&
              !dut.g_row[y].g_col[x].u_router.in_ready[o]) n_link_bp++;
        end
      end
    end
  end

  // Sources: hold each packet until accepted.
  logic took [NN];
  always @(posedge clk) for (int n = 0; n < NN; n++) took[n] <= in_valid[n] && in_ready[n];

  always @(posedge clk) begin
    #1;
    for (int n = 0; n < NN; n++) begin
      if (rst) begin
        in_valid[n] <= 1'b0;
        in_pkt[n]   <= '0;
      end else if (mode != 0 && (!in_valid[n] || took[n])) begin
        if ($urandom_range(0, 99) < offer_pct) begin
          packet_t p;
          int d;
          d = (mode == 2) ? hotspot : $urandom_range(0, NN-1);
          p.src_x   = COORD_W'(n % COLS);
          p.src_y   = COORD_W'(n / COLS);
          p.dst_x   = COORD_W'(d % COLS);
          p.dst_y   = COORD_W'(d / COLS);
          p.payload = DATA_W'($urandom);
          in_pkt[n]   <= p;
          in_valid[n] <= 1'b1;
        end else begin
          in_valid[n] <= 1'b0;
        end
      end else if (mode == 0 && took[n]) begin
        in_valid[n] <= 1'b0;
      end
    end
    for (int n = 0; n < NN; n++) out_ready[n] <= rst ? 1'b0 : ($urandom_range(0, 99) < ready_pct);
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One zero-load packet from node s to node d, latency checked.
  task automatic single(input int s, input int d);
    longint t_in;
    int hops;
    packet_t p;
    hops = ((s % COLS) > (d % COLS) ? (s % COLS) - (d % COLS) : (d % COLS) - (s % COLS)) +
           ((s / COLS) > (d / COLS) ? (s / COLS) - (d / COLS) : (d / COLS) - (s / COLS));
    p.src_x = COORD_W'(s % COLS); p.src_y = COORD_W'(s / COLS);
    p.dst_x = COORD_W'(d % COLS); p.dst_y = COORD_W'(d / COLS);
    p.payload = DATA_W'($urandom);
    @(posedge clk); #2;
    in_pkt[s] = p; in_valid[s] = 1'b1;
    @(posedge clk);
    t_in = cycle;
    #2 in_valid[s] = 1'b0;
    while (!(out_valid[d] && out_ready[d])) @(posedge clk);
    check(cycle - t_in == longint'(4*(hops+1)),
          $sformatf("latency %0d->%0d: %0d cycles, expected %0d", s, d, cycle - t_in, 4*(hops+1)));
    repeat (2) @(posedge clk);
  endtask

  initial begin
    rst = 1'b1;
    for (int n = 0; n < NN; n++) begin in_valid[n] = 1'b0; in_pkt[n] = '0; out_ready[n] = 1'b0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Phase 1: zero-load latency.
    ready_pct = 100;
    single(0, 0);     // 0 hops
    single(0, 15);    // 6 hops, east then south
    single(15, 0);    // 6 hops, west then north
    single(3, 12);    // 6 hops, west then south
    single(6, 9);     // 2 hops
    single(12, 3);    // 6 hops, east then north

    // Phase 2: uniform random traffic.
    mode = 1; offer_pct = 40; ready_pct = 50;
    repeat (3000) @(posedge clk);
    // Phase 3: hotspot.
    mode = 2; offer_pct = 60; ready_pct = 70; hotspot = 5;
    repeat (1000) @(posedge clk);
    // Phase 4: drain.
    mode = 0; ready_pct = 100;
    repeat (400) @(posedge clk);

    begin
      int left;
      left = 0;
      for (int q = 0; q < NN*NN; q++) left += exp_q[q].size();
      check(left == 0, $sformatf("all packets delivered (%0d left)", left));
    end
    check(sent == received, "packet count conserved");
    check(n_contention > 0, "arbitration contention happened");
    check(n_local_bp > 0, "local port back-pressure happened");
    check(n_link_bp > 0, "link back-pressure happened");
    check(n_stall > 0, "sink stall happened");
    for (int o = 1; o < NPORTS; o++)
      check(n_dir[o] > 0, $sformatf("link traffic through output port %0d", o));
    $display("sent=%0d received=%0d contention=%0d local_bp=%0d link_bp=%0d stall=%0d",
             sent, received, n_contention, n_local_bp, n_link_bp, n_stall);
    $display("link handshakes N=%0d E=%0d S=%0d W=%0d",
             n_dir[PORT_NORTH], n_dir[PORT_EAST], n_dir[PORT_SOUTH], n_dir[PORT_WEST]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
