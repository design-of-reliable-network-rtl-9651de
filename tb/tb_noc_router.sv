// tb_noc_router: self-checking test of one five-port router.
//
// The router sits at column 1, row 1 of a 4x4 mesh so that every output is
// reachable. Five sources drive random packets on the five input links with
// the valid/ready rule (a packet stays offered until accepted); five sinks
// take packets with random ready. A scoreboard built from the testbench's own
// XY rule expects each packet on one output, in order per input-output pair,
// and checks that nothing is lost, duplicated or misrouted. A first phase
// checks the zero-load latency of 4 cycles between link handshakes. Counted
// mechanisms, each of which must occur: contention (two or more inputs asking
// for one output in a cycle), input back-pressure (in_ready low while a packet
// is offered), output stall (out_valid while the sink is not ready), and
// traffic on every output port.
module tb_noc_router;
  import noc_pkg::*;
  localparam int unsigned N = NPORTS;
  localparam int unsigned RX = 1, RY = 1;

  logic clk = 1'b0;
  logic rst;
  packet_t in_pkt [N];
  logic    in_valid [N];
  logic    in_ready [N];
  packet_t out_pkt [N];
  logic    out_valid [N];
  logic    out_ready [N];

  int checks = 0, failures = 0;
  int n_contention = 0, n_backpressure = 0, n_stall = 0;
  int n_out [N] = '{default: 0};
  int sent = 0, received = 0;
  longint cycle = 0;

  noc_router #(.X(RX), .Y(RY)) dut (
    .clk(clk), .rst(rst),
    .in_pkt(in_pkt), .in_valid(in_valid), .in_ready(in_ready),
    .out_pkt(out_pkt), .out_valid(out_valid), .out_ready(out_ready)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  function automatic int ref_port(input packet_t p);
    if (p.dst_x > RX) return int'(PORT_EAST);
    if (p.dst_x < RX) return int'(PORT_WEST);
    if (p.dst_y > RY) return int'(PORT_SOUTH);
    if (p.dst_y < RY) return int'(PORT_NORTH);
    return int'(PORT_LOCAL);
  endfunction

  packet_t exp_q [N*N][$];    // [output*N + input]
  bit      drive_en = 1'b0;
  int      offer_pct = 70, ready_pct = 60;

  // Sampling at each rising edge: handshakes, scoreboard, mechanism counters.
  always @(posedge clk) if (!rst) begin
    for (int o = 0; o < N; o++) begin
      int hits;
      hits = 0;
      for (int i = 0; i < N; i++) if (dut.req[o][i]) hits++;
      if (hits > 1) n_contention++;
      if (out_valid[o] && !out_ready[o]) n_stall++;
    end
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && !in_ready[i]) n_backpressure++;
      if (in_valid[i] && in_ready[i]) begin
        exp_q[ref_port(in_pkt[i])*N+i].push_back(in_pkt[i]);
        sent++;
      end
    end
    for (int o = 0; o < N; o++) if (out_valid[o] && out_ready[o]) begin
      bit found;
      found = 1'b0;
      for (int i = 0; i < N && !found; i++)
        if (exp_q[o*N+i].size() != 0 && exp_q[o*N+i][0] == out_pkt[o]) begin
          void'(exp_q[o*N+i].pop_front());
          found = 1'b1;
        end
      check(found, $sformatf("packet %h on output %0d expected", out_pkt[o], o));
      n_out[o]++;
      received++;
    end
  end

  // Sources: random packets, held until accepted.
  always @(posedge clk) begin
    #1;
    for (int i = 0; i < N; i++) begin
      if (rst) begin
        in_valid[i] <= 1'b0;
        in_pkt[i]   <= '0;
      end else if (!in_valid[i] || in_ready_q[i]) begin
        if (drive_en && $urandom_range(0, 99) < offer_pct) begin
          packet_t p;
          p = packet_t'($urandom);
          in_valid[i] <= 1'b1;
          in_pkt[i]   <= p;
        end else begin
          in_valid[i] <= 1'b0;
        end
      end
    end
    for (int o = 0; o < N; o++) out_ready[o] <= rst ? 1'b0 : ($urandom_range(0, 99) < ready_pct);
  end

  // Whether the packet on offer was taken at the edge just passed.
  logic in_ready_q [N];
  always @(posedge clk) for (int i = 0; i < N; i++) in_ready_q[i] <= in_valid[i] && in_ready[i];

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_in, t_out;
    packet_t p;
    rst = 1'b1;
    for (int i = 0; i < N; i++) begin in_valid[i] = 1'b0; in_pkt[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Zero-load latency, west input to east output (one packet, sink ready).
    ready_pct = 100;
    @(posedge clk);
    #2;
    p = '{src_y: 2'd1, src_x: 2'd0, dst_y: 2'd1, dst_x: 2'd3, payload: 8'hA5};
    in_pkt[PORT_WEST] = p; in_valid[PORT_WEST] = 1'b1;
    @(posedge clk);
    t_in = cycle;
    #2 in_valid[PORT_WEST] = 1'b0;
    while (!(out_valid[PORT_EAST] && out_ready[PORT_EAST])) @(posedge clk);
    t_out = cycle;
    check(t_out - t_in == 4, $sformatf("zero-load latency %0d, expected 4", t_out - t_in));
    check(out_pkt[PORT_EAST] == p, "latency packet contents");
    repeat (3) @(posedge clk);

    // Random traffic: a congested phase, then a free-flowing one.
    ready_pct = 30; offer_pct = 80; drive_en = 1'b1;
    repeat (1500) @(posedge clk);
    ready_pct = 90; offer_pct = 50;
    repeat (1500) @(posedge clk);
    drive_en = 1'b0; ready_pct = 100;
    repeat (60) @(posedge clk);

    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++) begin
        int left;
        left = exp_q[o*N+i].size();
        check(left == 0, $sformatf("all packets delivered out %0d in %0d (%0d left)", o, i, left));
      end
    check(sent == received, "packet count conserved");
    check(n_contention > 0, "contention happened");
    check(n_backpressure > 0, "back-pressure happened");
    check(n_stall > 0, "output stall happened");
    for (int o = 0; o < N; o++) check(n_out[o] > 0, $sformatf("output %0d used", o));
    $display("sent=%0d received=%0d contention=%0d backpressure=%0d stall=%0d",
             sent, received, n_contention, n_backpressure, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
