// sm_p_block: priority selection for the self-motivated arbiter.
//
// Picks the requesting master with the highest priority level; among
// equal levels the lowest master number wins. With use_level low all
// levels are treated as equal, which gives the fixed-priority policy
// (master 0 first). With use_level high the levels are the P_Level values
// the masters notified in their addresses, which gives the dynamic
// policy. Combinational; the arbiter registers the result.
//
// Interface: req (one bit per master), level (3-bit level per master),
// use_level, valid (some master requests) and idx (the selected master).
// The fixed and dynamic policies come from the published scheme; that a
// larger level means a higher priority, and the tie rule, are this
// design's choices.
module sm_p_block
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 8,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic [NUM_MASTERS-1:0]               req,
  input  logic [NUM_MASTERS-1:0][PLEVEL_W-1:0] level,
  input  logic                                 use_level,
  output logic                                 valid,
  output logic [IDX_W-1:0]                     idx
);

  always_comb begin
    logic [PLEVEL_W-1:0] best;
    logic [PLEVEL_W-1:0] lv;
    valid = 1'b0;
    idx   = '0;
    best  = '0;
    for (int unsigned m = 0; m < NUM_MASTERS; m++) begin
      lv = use_level ? level[m] : '0;
      // Strictly greater: an equal level never displaces a lower number.
      if (req[m] && (!valid || lv > best)) begin
        valid = 1'b1;
        idx   = IDX_W'(m);
        best  = lv;
      end
    end
  end

endmodule
