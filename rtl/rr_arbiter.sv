// rr_arbiter: round robin (rotating priority) arbiter built from a masked and
// an unmasked fixed priority arbiter.
//
// The request vector is ANDed with a mask that keeps only the requesters after
// the last one served. The masked priority arbiter picks among those; the
// unmasked priority arbiter picks among all requests. A mux passes the masked
// grant (input 0) unless the masked requests are all zero, in which case it
// passes the unmasked grant (input 1), so the turn wraps round to the lowest
// index. On each clock edge with advance high and a grant given, the mask
// logic sets the mask to the bits above the granted index. The requester just
// served thus has the lowest priority next time, and a waiting requester is
// served after at most N-1 others.
//
// grant is combinational from req and the mask register. advance tells the
// arbiter that the grant was used (the shared output could take the packet);
// without it the mask holds. Reset (synchronous, active high) opens the mask
// to all ones, so index 0 has the first turn.
//
// The structure (two priority arbiters, 'masked == 0' mux select, clocked mask
// logic) follows the document's figure of the arbiter; the mask update rule,
// the advance input and the reset value are this design's own choices.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  logic         masked_zero;   // the mux takes the unmasked arbiter
  logic [N-1:0] mask, masked_req, grant_masked, grant_unmasked, mask_next;

  assign masked_req  = req & mask;
  assign masked_zero = (masked_req == '0);

  priority_arbiter #(.N(N)) u_masked   (.req(masked_req), .grant(grant_masked));
  priority_arbiter #(.N(N)) u_unmasked (.req(req),        .grant(grant_unmasked));

  assign grant = masked_zero ? grant_unmasked : grant_masked;

  // Bits strictly above the granted index: (grant << 1) - 1 covers the
  // granted bit and all below it.
  assign mask_next = ~((grant << 1) - 1'b1);

  always_ff @(posedge clk) begin
    if (rst)                        mask <= '1;
    else if (advance && grant != '0) mask <= mask_next;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  a_subset: assert property (@(posedge clk) disable iff (rst) (grant & ~req) == '0);

endmodule
