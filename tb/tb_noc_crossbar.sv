// tb_noc_crossbar: self-checking test of the router crossbar.
//
// Applies random packets on the five inputs and random permutations and
// partial selections (each output selects at most one input, possibly none,
// and an input may feed several outputs). Expected outputs are computed in
// the testbench: the selected input's packet with out_valid high, or zero
// with out_valid low.
module tb_noc_crossbar;
  import noc_pkg::*;
  localparam int unsigned N = NPORTS;
  packet_t      in_pkt [N];
  logic [N-1:0] sel    [N];
  packet_t      out_pkt[N];
  logic [N-1:0] out_valid;
  int checks = 0, failures = 0;

  noc_crossbar #(.N(N)) dut (.in_pkt(in_pkt), .sel(sel), .out_pkt(out_pkt), .out_valid(out_valid));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src[N];
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) in_pkt[i] = packet_t'($urandom);
      for (int o = 0; o < N; o++) begin
        src[o] = $urandom_range(0, N);          // N means no input
        sel[o] = (src[o] == N) ? '0 : (N'(1) << src[o]);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (src[o] == N) begin
          if (out_valid[o] || out_pkt[o] != '0) begin
            failures++;
            $display("FAIL idle output %0d", o);
          end
        end else if (!out_valid[o] || out_pkt[o] != in_pkt[src[o]]) begin
          failures++;
          $display("FAIL output %0d from input %0d", o, src[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
