// tb_noc_fifo: self-checking test of the synchronous FIFO.
//
// Drives random writes, reads and simultaneous read-and-write operations
// against a queue reference model. After every edge it checks full, empty
// and, after each accepted read, data_out. It also checks that a write into a
// full FIFO is ignored, a read from an empty one changes nothing, and that
// data_out holds its word between reads. Counts how often each operation
// (write, read, both, write when full, read when empty) happened and fails a
// check for any that never did.
module tb_noc_fifo;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0;
  logic rst;
  logic we, re;
  logic [WIDTH-1:0] din, dout;
  logic full, empty;

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_both = 0, n_wr_full = 0, n_rd_empty = 0;

  noc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .write_enable(we), .read_enable(re),
    .data_in(din), .full(full), .empty(empty), .data_out(dout)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [WIDTH-1:0] model[$];
  logic [WIDTH-1:0] last_out;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; re = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(empty && !full && dout == '0, "reset state");
    last_out = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int phase;
      bit acc_wr, acc_rd;
      phase = (cyc / 200) % 3;   // bias: fill, drain, mixed
      we  = (phase == 0) ? ($urandom_range(0, 9) < 8) :
            (phase == 1) ? ($urandom_range(0, 9) < 2) : $urandom_range(0, 1);
      re  = (phase == 0) ? ($urandom_range(0, 9) < 2) :
            (phase == 1) ? ($urandom_range(0, 9) < 8) : $urandom_range(0, 1);
      din = WIDTH'($urandom);
      acc_rd = re && (model.size() != 0);
      acc_wr = we && (model.size() < DEPTH);
      if (we && model.size() == DEPTH) n_wr_full++;
      if (re && model.size() == 0) n_rd_empty++;
      if (acc_wr && acc_rd) n_both++;
      else if (acc_wr) n_wr++;
      else if (acc_rd) n_rd++;
      @(posedge clk);
      if (acc_rd) last_out = model.pop_front();
      if (acc_wr) model.push_back(din);
      #1;
      check(dout == last_out, "data_out");
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
    end
    check(n_wr > 0 && n_rd > 0 && n_both > 0 && n_wr_full > 0 && n_rd_empty > 0,
          "every operation exercised");
    $display("writes=%0d reads=%0d both=%0d write_when_full=%0d read_when_empty=%0d",
             n_wr, n_rd, n_both, n_wr_full, n_rd_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
