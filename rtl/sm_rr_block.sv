// sm_rr_block: round-robin selection for the self-motivated arbiter.
//
// Given the request vector of the masters and the number of the master
// that was selected last, it picks the first requesting master after the
// last one, wrapping around, so that every requester is served in turn.
// The last-selected number comes from the arbiter's Master No. register.
// Purely combinational; the result is registered by the arbiter.
//
// Interface: req (one bit per master), last (master selected last),
// valid (some master requests) and idx (the selected master).
// The published scheme names this block and its job; the rotating search is this
// design's implementation of it.
module sm_rr_block #(
  parameter int unsigned NUM_MASTERS = 8,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic [NUM_MASTERS-1:0] req,
  input  logic [IDX_W-1:0]       last,
  output logic                   valid,
  output logic [IDX_W-1:0]       idx
);

  always_comb begin
    int unsigned cand;
    valid = 1'b0;
    idx   = last;
    // Search the masters after `last`, from the nearest onwards; the
    // first hit wins. `last` itself is tried at the end.
    for (int unsigned k = 1; k <= NUM_MASTERS; k++) begin
      cand = (int'(last) + k) % NUM_MASTERS;
      if (!valid && req[cand]) begin
        valid = 1'b1;
        idx   = IDX_W'(cand);
      end
    end
  end

endmodule
