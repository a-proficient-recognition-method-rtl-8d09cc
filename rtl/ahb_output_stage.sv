// ahb_output_stage: slave-side output stage of the bus matrix.
//
// Every slave port has one. Its self-motivated arbiter (sm_arbiter)
// chooses which master owns the slave; a multiplexer then drives the
// slave with the owner's address phase, taken from that master's input
// stage, and a data-phase register remembers whose transfer is in the
// slave's data phase so that the right master's HWDATA is forwarded.
// With no owner (NoPort) or no request from the owner, the slave sees
// HTRANS IDLE.
//
// The slave receives only the offset part of the address, HADDR[21:0],
// with the S_Number, P_Level and T_Length fields cleared. When the owner
// changes in the middle of a burst, the first transfer the slave sees from
// the new owner is turned from SEQ into NONSEQ with HBURST INCR, so the
// slave always sees legal bursts.
//
// Interface: the input stages' offered transfers (m_ap, m_req for this
// slave) and write data; the slave's AHB signals, HMASTER (owner number)
// and HREADYOUT/HRESP in; accept tells master m that its transfer was
// taken this cycle. A transfer is taken in a cycle in which the owner
// offers one and the slave's HREADY is high. The arbiter, multiplexer and
// slave-side arbitration follow the published scheme; address clearing and the
// SEQ-to-NONSEQ rewrite are this design's choices.
module ahb_output_stage
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  arb_cfg_t                             cfg,
  input  ahb_aphase_t [NUM_MASTERS-1:0]        m_ap,
  input  logic        [NUM_MASTERS-1:0]        m_req,
  input  logic [NUM_MASTERS-1:0][DATA_W-1:0]   m_hwdata,
  output logic [NUM_MASTERS-1:0]               accept,
  // slave port
  output logic                                 s_hsel,
  output ahb_aphase_t                          s_ap,
  output logic [DATA_W-1:0]                    s_hwdata,
  output logic [IDX_W-1:0]                     s_hmaster,
  input  logic                                 s_hreadyout
);

  logic                                 noport;
  logic [IDX_W-1:0]                     owner;
  logic [NUM_MASTERS-1:0][PLEVEL_W-1:0] level;
  logic [NUM_MASTERS-1:0][TLEN_W-1:0]   tlen;
  ahb_aphase_t                          own_ap;
  logic                                 own_req;
  policy_e                              cur_policy;
  unit_e                                cur_unit;
  logic                                 grant_evt;

  always_comb begin
    for (int unsigned m = 0; m < NUM_MASTERS; m++) begin
      level[m] = addr_plevel(m_ap[m].addr);
      tlen[m]  = addr_tlen(m_ap[m].addr);
    end
    own_ap  = m_ap[owner];
    own_req = !noport && m_req[owner];
  end

  sm_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arb (
    .clk, .rst_n, .cfg,
    .hready    (s_hreadyout),
    .req       (m_req),
    .level, .tlen,
    .own_trans (own_ap.trans),
    .own_burst (own_ap.burst),
    .own_lock  (own_ap.lock),
    .noport,
    .master_no (owner),
    .cur_policy, .cur_unit, .grant_evt
  );

  // Last master whose transfer this slave took, and the data-phase owner.
  logic             prev_valid_q, dph_valid_q;
  logic [IDX_W-1:0] prev_master_q, dph_master_q;

  always_comb begin
    s_hsel = !noport;
    s_ap   = '0;
    s_ap.trans = HTRANS_IDLE;
    if (own_req) begin
      s_ap = own_ap;
      s_ap.addr = {{(ADDR_W-OFFSET_W){1'b0}}, addr_offset(own_ap.addr)};
      if (own_ap.trans == HTRANS_SEQ && !(prev_valid_q && prev_master_q == owner)) begin
        s_ap.trans = HTRANS_NONSEQ;
        s_ap.burst = HBURST_INCR;
      end
    end
    s_hmaster = owner;
    s_hwdata  = dph_valid_q ? m_hwdata[dph_master_q] : '0;
    accept    = '0;
    if (own_req && s_hreadyout) accept[owner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_valid_q  <= 1'b0;
      prev_master_q <= '0;
      dph_valid_q   <= 1'b0;
      dph_master_q  <= '0;
    end else if (s_hreadyout) begin
      dph_valid_q  <= own_req;
      dph_master_q <= owner;
      if (own_req) begin
        prev_valid_q  <= 1'b1;
        prev_master_q <= owner;
      end
    end
  end

  // The address phase must not change while the slave stalls it.
  a_stable_aphase: assert property (@(posedge clk) disable iff (!rst_n)
      (!s_hreadyout && own_req) |=> (own_req && $stable(owner)));

endmodule
