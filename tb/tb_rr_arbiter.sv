// tb_rr_arbiter: self-checking test of the round robin arbiter.
//
// A reference model keeps the index of the last requester served and grants
// the first active request after it, wrapping round. Random request patterns
// and random advance are applied; the grant is compared every cycle. A second
// phase holds all requests high and checks that each of the N requesters is
// served exactly once in every N grants, and that a single requester waits at
// most N-1 grants (the worst-case wait the round robin scheme promises).
// Counts wrap-rounds (masked requests all zero) and held grants (advance low).
module tb_rr_arbiter;
  localparam int unsigned N = 5;
  logic clk = 1'b0;
  logic rst;
  logic [N-1:0] req, grant, expect_g;
  logic advance;
  int checks = 0, failures = 0;
  int last;          // model: last served index, N-1 after reset
  int n_wrap = 0, n_hold = 0;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst(rst), .req(req), .advance(advance), .grant(grant));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t req=%b grant=%b", what, $time, req, grant);
    end
  endtask

  function automatic logic [N-1:0] model_grant(input logic [N-1:0] r, input int l);
    for (int k = 1; k <= N; k++) begin
      int idx = (l + k) % N;
      if (r[idx]) return N'(1) << idx;
    end
    return '0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int served[N];
    int wait_cnt;
    rst = 1'b1; req = '0; advance = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    last = N-1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      req = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      expect_g = model_grant(req, last);
      check(grant == expect_g, "grant matches model");
      if (req != '0) begin
        int gi;
        gi = 0;
        for (int i = 0; i < N; i++) if (expect_g[i]) gi = i;
        if (gi <= last) n_wrap++;
        if (advance) last = gi;
        else n_hold++;
      end
      @(posedge clk);
      #1;
    end
    // Fairness under full load.
    req = '1; advance = 1'b1;
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < N; i++) served[i] = 0;
      for (int k = 0; k < N; k++) begin
        #1;
        for (int i = 0; i < N; i++) if (grant[i]) served[i]++;
        @(posedge clk);
        #1;
      end
      for (int i = 0; i < N; i++) check(served[i] == 1, "each requester once per N grants");
    end
    // Worst-case wait: requester 2 joins while the others keep requesting.
    req = 5'b11011;
    @(posedge clk); #1;
    req = 5'b11111;
    wait_cnt = 0;
    #1;
    while (!grant[2] && wait_cnt < 2*N) begin
      @(posedge clk); #1;
      wait_cnt++;
    end
    check(wait_cnt <= N-1, "wait at most N-1 grants");
    check(n_wrap > 0 && n_hold > 0, "wrap-round and held grant both happened");
    $display("wraps=%0d holds=%0d worst_wait=%0d", n_wrap, n_hold, wait_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
