// sm_counter: transfer-length counter of the self-motivated arbiter.
//
// Holds the number of transfers the current owner of a slave may still
// issue before the arbiter re-arbitrates. The controller loads it with the
// length of the unit of arbitration (1 for a transfer, the beats of a
// burst, or the master's desired length T_Length) and counts it down by
// one for every transfer the slave accepts. It saturates at zero.
//
// Interface: load/load_val (load wins over dec), dec, count. One clock,
// active-low asynchronous reset to zero. The counter itself is part of
// the published scheme; loadable down-counting is this design's choice.
module sm_counter
  import ahb_pkg::*;
#(
  parameter int unsigned WIDTH = CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] load_val,
  input  logic             dec,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (load)              count <= load_val;
    else if (dec && count != 0) count <= count - 1'b1;
  end

endmodule
