// noc_crossbar: the router's switch, purely combinational.
//
// For each output port, sel[o] is the one-hot grant of that output's arbiter
// over the inputs. The crossbar forwards the packet of the selected input to
// the output and raises out_valid[o]; with no input selected the output word
// is zero and out_valid[o] is low. Several outputs may take packets from
// different inputs in the same cycle.
//
// The document says the arbiter's control signal steers the source input's
// data to the output port; the AND-OR mux is this design's own.
module noc_crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  packet_t      in_pkt    [N],
  input  logic [N-1:0] sel       [N],   // sel[output][input], one-hot or zero
  output packet_t      out_pkt   [N],
  output logic [N-1:0] out_valid
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_pkt[o]   = '0;
      out_valid[o] = |sel[o];
      for (int i = 0; i < N; i++)
        if (sel[o][i]) out_pkt[o] = out_pkt[o] | in_pkt[i];
    end
  end

endmodule
