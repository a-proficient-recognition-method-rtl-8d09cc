// ahb_input_stage: master-side input stage of the bus matrix.
//
// Every master port has one. When the master's address phase is sampled
// (HREADY high towards the master and HTRANS NONSEQ or SEQ) but no output
// stage accepts the transfer in that cycle, the input stage keeps the
// address and control in a register, and the transfer is offered from
// there until an output stage (or the default slave) takes it. Meanwhile
// the decoder holds HREADY low towards the master, so the master keeps its
// next address and its write data stable.
//
// Interface: m_ap is the master's address phase, hready_m the HREADY the
// master sees, accept that the offered transfer is taken this cycle. cur
// and cur_valid give the transfer offered to the decoder and output
// stages: the held one if there is one, otherwise the master's live one.
// held tells that the offer comes from the register. A live transfer is
// offered in the cycle it is sampled, so an idle, granted path adds no
// latency. Holding the address and control is part of the published scheme; BUSY
// transfers are not forwarded, which is this design's simplification.
module ahb_input_stage
  import ahb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ahb_aphase_t m_ap,
  input  logic        hready_m,
  input  logic        accept,
  output ahb_aphase_t cur,
  output logic        cur_valid,
  output logic        held
);

  logic        held_q;
  ahb_aphase_t held_ap_q;
  logic        live_valid;

  assign live_valid = hready_m && trans_valid(m_ap.trans);
  assign cur_valid  = held_q || live_valid;
  assign cur        = held_q ? held_ap_q : m_ap;
  assign held       = held_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q    <= 1'b0;
      held_ap_q <= '0;
    end else if (held_q) begin
      if (accept) held_q <= 1'b0;
    end else if (live_valid && !accept) begin
      held_q    <= 1'b1;
      held_ap_q <= m_ap;
    end
  end

  // A held transfer is only possible while the master is stalled.
  a_held_stalls: assert property (@(posedge clk) disable iff (!rst_n)
                                  held_q |-> !hready_m);

endmodule
