// priority_arbiter: fixed priority arbiter, purely combinational.
//
// grant is one-hot with the lowest-numbered active bit of req, or zero when no
// request is active. The round robin arbiter uses two of these, one on the
// masked and one on the unmasked requests. The document names the block; the
// choice of index 0 as highest priority is this design's own.
module priority_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  // Two's complement isolates the lowest set bit: req & -req.
  assign grant = req & (~req + 1'b1);

endmodule
