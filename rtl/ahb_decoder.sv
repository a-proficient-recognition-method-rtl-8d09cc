// ahb_decoder: master-side decoder of the bus matrix.
//
// Every master port has one. It decodes the target slave from the
// S_Number field (HADDR[31:29]) of the transfer its input stage offers
// and raises the request for that output stage. It also follows the
// master's data phase and routes back the response: a register records
// whether the master's last transfer is waiting in the input stage, is on
// slave s, or went to the default slave, and a multiplexer returns that
// slave's HREADY, HRESP and HRDATA to the master.
//
// Data-phase states:
//   NONE  no data phase: HREADY high, OKAY
//   PEND  transfer held in the input stage: HREADY low, OKAY
//   SLAVE data phase on slave dslave: that slave's response
//   ERR1, ERR2  an address with S_Number >= NUM_SLAVES: the default slave
//         answers with the two-cycle ERROR response
// Interface: cur/cur_valid from the input stage, accept_s (the transfer
// was taken by output stage s this cycle), the slaves' HREADYOUT, HRESP,
// HRDATA; req_s per output stage, def_accept (taken by the default slave)
// and the master's HREADY, HRESP, HRDATA. Decoding and response routing
// follow the published scheme; the default slave is this design's addition, as AHB
// requires a response to every address.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 2,
  localparam int unsigned SIDX_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  ahb_aphase_t                         cur,
  input  logic                                cur_valid,
  input  logic [NUM_SLAVES-1:0]               accept_s,
  input  logic [NUM_SLAVES-1:0]               s_hready,
  input  logic [NUM_SLAVES-1:0][1:0]          s_hresp,
  input  logic [NUM_SLAVES-1:0][DATA_W-1:0]   s_hrdata,
  output logic [NUM_SLAVES-1:0]               req_s,
  output logic                                def_accept,
  output logic                                hready_m,
  output logic [1:0]                          hresp_m,
  output logic [DATA_W-1:0]                   hrdata_m
);

  typedef enum logic [2:0] {DP_NONE, DP_PEND, DP_SLAVE, DP_ERR1, DP_ERR2} dphase_e;

  dphase_e           state_q, state_d;
  logic [SIDX_W-1:0] dslave_q, dslave_d;
  logic [SNUM_W-1:0] snum;
  logic              mapped;
  logic              any_accept;
  logic [SIDX_W-1:0] acc_slave;

  always_comb begin
    snum   = addr_snum(cur.addr);
    mapped = int'(snum) < NUM_SLAVES;
    req_s  = '0;
    for (int unsigned s = 0; s < NUM_SLAVES; s++)
      req_s[s] = cur_valid && mapped && (int'(snum) == s);
    def_accept = cur_valid && !mapped;

    any_accept = |accept_s;
    acc_slave  = '0;
    for (int unsigned s = 0; s < NUM_SLAVES; s++)
      if (accept_s[s]) acc_slave = SIDX_W'(s);
  end

  // Response multiplexer.
  always_comb begin
    hready_m = 1'b1;
    hresp_m  = HRESP_OKAY;
    hrdata_m = '0;
    unique case (state_q)
      DP_PEND:  hready_m = 1'b0;
      DP_SLAVE: begin
        hready_m = s_hready[dslave_q];
        hresp_m  = s_hresp[dslave_q];
        hrdata_m = s_hrdata[dslave_q];
      end
      DP_ERR1: begin hready_m = 1'b0; hresp_m = HRESP_ERROR; end
      DP_ERR2: begin hready_m = 1'b1; hresp_m = HRESP_ERROR; end
      default: ;
    endcase
  end

  // Data-phase tracking.
  always_comb begin
    state_d  = state_q;
    dslave_d = dslave_q;
    if (hready_m) begin
      // The previous data phase ends; a new address phase may be sampled.
      if (!cur_valid)       state_d = DP_NONE;
      else if (!mapped)     state_d = DP_ERR1;
      else if (any_accept) begin
        state_d  = DP_SLAVE;
        dslave_d = acc_slave;
      end else              state_d = DP_PEND;
    end else begin
      unique case (state_q)
        DP_PEND: if (any_accept) begin
          state_d  = DP_SLAVE;
          dslave_d = acc_slave;
        end
        DP_ERR1: state_d = DP_ERR2;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= DP_NONE;
      dslave_q <= '0;
    end else begin
      state_q  <= state_d;
      dslave_q <= dslave_d;
    end
  end

  // At most one output stage takes a transfer at a time.
  a_one_accept: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(accept_s));

endmodule
