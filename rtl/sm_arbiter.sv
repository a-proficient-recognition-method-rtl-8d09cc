// sm_arbiter: self-motivated arbiter of one slave port of the bus matrix.
//
// The arbiter decides which master owns the slave. It supports three
// priority policies (fixed priority by master number, round robin, and
// dynamic priority by the level each master notifies) and three units of
// arbitration (one transfer, one burst transaction, or the transfer length
// the master asks for): nine schemes in all. In self-motivated mode
// (cfg.sm_en) it picks the scheme by itself for every decision:
//   * policy: dynamic priority as soon as one competing master has
//     notified a non-zero P_Level, otherwise cfg.base_policy;
//   * unit: the desired length as soon as the chosen master has notified
//     a non-zero T_Length, otherwise cfg.base_unit.
// With sm_en low, cfg.base_policy and cfg.base_unit are used as they are.
//
// Structure, as the published scheme lays it out: an RR block and a P block compute
// a candidate each, MUX_1 picks one by policy, MUX_2 picks that master's
// desired length for the counter, the controller decides when to
// re-arbitrate, and two flip-flops, enabled by the slave's HREADY, hold
// NoPort (no master selected, the slave sees IDLE) and Master No.
//
// Timing: the outputs are registered, so a decision taken in a cycle with
// HREADY high applies from the next cycle on. The controller re-arbitrates
// in a cycle with HREADY high when
//   * the owner has no request for this slave (or there is no owner), or
//   * the owner's transfer is being accepted and it is the last of its
//     unit (counter at one, or the last beat of its burst),
// unless the owner holds HMASTLOCK. When the owner's last transfer is
// accepted, the other requesters are preferred; the owner keeps the slave
// only if nobody else asks for it.
//
// Interface: req/level/tlen per master (request for this slave, notified
// P_Level and T_Length of its current address phase); own_trans,
// own_burst, own_lock: control of the owner's current address phase;
// hready: HREADY of the slave; noport, master_no: the two flip-flops.
// The re-arbitration rule, the use of HBURST for burst length, the
// preference for other masters and the self-motivated selection rule are
// this design's reading of what the published scheme gives only in outline.
module sm_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 8,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  arb_cfg_t                             cfg,
  input  logic                                 hready,
  input  logic [NUM_MASTERS-1:0]               req,
  input  logic [NUM_MASTERS-1:0][PLEVEL_W-1:0] level,
  input  logic [NUM_MASTERS-1:0][TLEN_W-1:0]   tlen,
  input  htrans_e                              own_trans,
  input  hburst_e                              own_burst,
  input  logic                                 own_lock,
  output logic                                 noport,
  output logic [IDX_W-1:0]                     master_no,
  // Observation: the scheme chosen by the last decision, and a strobe for
  // every decision that selects a master.
  output policy_e                              cur_policy,
  output unit_e                                cur_unit,
  output logic                                 grant_evt
);

  logic                 noport_q;
  logic [IDX_W-1:0]     master_q;
  unit_e                unit_q;
  policy_e              policy_q;
  logic [CNT_W-1:0]     count;

  // ---- controller: when to re-arbitrate ---------------------------------
  logic                   owner_req, issue, locked, last, keep, rearb;
  logic [CNT_W-1:0]       remaining;
  logic [NUM_MASTERS-1:0] owner_bit, others, req_arb;

  always_comb begin
    owner_bit = '0;
    if (!noport_q) owner_bit[master_q] = 1'b1;
    owner_req = |(req & owner_bit);
    issue     = hready && owner_req;
    locked    = owner_req && own_lock;
    // A burst's first beat sets the remaining length of a transaction.
    remaining = (unit_q == UNIT_TRANSACTION && own_trans == HTRANS_NONSEQ)
                ? burst_beats(own_burst) : count;
    last      = remaining <= CNT_W'(1);
    keep      = owner_req && (locked || !last);
    rearb     = hready && !keep;
    others    = req & ~owner_bit;
    req_arb   = (others != '0) ? others : req;
  end

  // ---- RR block, P block, MUX_1, MUX_2 ----------------------------------
  logic             any_level;
  policy_e          policy;
  unit_e            unit;
  logic             rr_valid, p_valid, win_valid;
  logic [IDX_W-1:0] rr_idx, p_idx, win_idx;
  logic [TLEN_W-1:0] win_tlen;
  logic [CNT_W-1:0] load_len;

  always_comb begin
    any_level = 1'b0;
    for (int unsigned m = 0; m < NUM_MASTERS; m++)
      if (req_arb[m] && level[m] != '0) any_level = 1'b1;
    policy = (cfg.sm_en && any_level) ? POL_DYNAMIC : cfg.base_policy;
  end

  sm_rr_block #(.NUM_MASTERS(NUM_MASTERS)) u_rr (
    .req(req_arb), .last(master_q), .valid(rr_valid), .idx(rr_idx)
  );

  sm_p_block #(.NUM_MASTERS(NUM_MASTERS)) u_p (
    .req(req_arb), .level(level), .use_level(policy == POL_DYNAMIC),
    .valid(p_valid), .idx(p_idx)
  );

  always_comb begin
    // MUX_1: the arbitration policy.
    if (policy == POL_RR) begin
      win_valid = rr_valid;
      win_idx   = rr_idx;
    end else begin
      win_valid = p_valid;
      win_idx   = p_idx;
    end
    // MUX_2: desired transfer length of the chosen master.
    win_tlen = tlen[win_idx];
    unit     = (cfg.sm_en && win_tlen != '0) ? UNIT_LENGTH : cfg.base_unit;
    unique case (unit)
      UNIT_LENGTH:      load_len = CNT_W'(win_tlen);
      UNIT_TRANSACTION: load_len = '0;          // set by the burst's first beat
      default:          load_len = CNT_W'(1);
    endcase
  end

  // ---- counter -----------------------------------------------------------
  logic             cnt_load, cnt_dec;
  logic [CNT_W-1:0] cnt_val;

  always_comb begin
    cnt_load = 1'b0;
    cnt_dec  = 1'b0;
    cnt_val  = load_len;
    if (rearb && win_valid) begin
      cnt_load = 1'b1;
    end else if (issue) begin
      if (unit_q == UNIT_TRANSACTION && own_trans == HTRANS_NONSEQ) begin
        cnt_load = 1'b1;
        cnt_val  = remaining - 1'b1;
      end else begin
        cnt_dec = 1'b1;
      end
    end
  end

  sm_counter #(.WIDTH(CNT_W)) u_cnt (
    .clk, .rst_n, .load(cnt_load), .load_val(cnt_val), .dec(cnt_dec), .count
  );

  // ---- NoPort and Master No. flip-flops, enabled by HREADY ---------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      noport_q <= 1'b1;
      master_q <= '0;
      unit_q   <= UNIT_TRANSFER;
      policy_q <= POL_FIXED;
    end else if (rearb) begin
      noport_q <= !win_valid;
      if (win_valid) begin
        master_q <= win_idx;
        unit_q   <= unit;
        policy_q <= policy;
      end
    end
  end

  assign noport     = noport_q;
  assign master_no  = master_q;
  assign cur_policy = policy_q;
  assign cur_unit   = unit_q;
  assign grant_evt  = rearb && win_valid;

  // The owner never changes while the slave holds HREADY low.
  property p_hold_when_stalled;
    @(posedge clk) disable iff (!rst_n)
      !hready |=> ($stable(noport_q) && $stable(master_q));
  endproperty
  a_hold_when_stalled: assert property (p_hold_when_stalled);

endmodule
