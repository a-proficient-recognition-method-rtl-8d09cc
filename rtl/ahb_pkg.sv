// ahb_pkg: types and constants shared by the multilayer AHB bus matrix.
//
// The bus matrix carries AMBA AHB transfers with a 32-bit address, 32-bit
// read and write data, a 15-bit control group (HTRANS, HWRITE, HSIZE,
// HBURST, HPROT, HMASTLOCK, HREADY) and a 3-bit response (HRESP, HREADY).
// The address doubles as the channel through which a master tells the
// arbiters its priority level and its desired transfer length:
//
//   HADDR[31:29]  S_Number    target slave
//   HADDR[28:26]  P_Level     priority level of the master (0 = none)
//   HADDR[25:22]  T_Length    desired transfer length      (0 = none)
//   HADDR[21:0]   Offset_Add  address inside the slave
//
// The field widths (3, 3, 4 bits) follow the published scheme; their placement in
// the word, with S_Number at the top, and the meaning of 0 as "nothing
// notified" are this design's choices.
package ahb_pkg;

  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned SNUM_W    = 3;   // up to 8 slaves
  localparam int unsigned PLEVEL_W  = 3;   // up to 8 priority levels
  localparam int unsigned TLEN_W    = 4;   // desired length 1..15
  localparam int unsigned OFFSET_W  = ADDR_W - SNUM_W - PLEVEL_W - TLEN_W;  // 22
  localparam int unsigned CNT_W     = 5;   // holds a length of up to 16

  // Bit positions of the address fields.
  localparam int unsigned SNUM_LSB   = ADDR_W - SNUM_W;          // 29
  localparam int unsigned PLEVEL_LSB = SNUM_LSB - PLEVEL_W;      // 26
  localparam int unsigned TLEN_LSB   = PLEVEL_LSB - TLEN_W;      // 22

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'd0,
    HBURST_INCR   = 3'd1,
    HBURST_WRAP4  = 3'd2,
    HBURST_INCR4  = 3'd3,
    HBURST_WRAP8  = 3'd4,
    HBURST_INCR8  = 3'd5,
    HBURST_WRAP16 = 3'd6,
    HBURST_INCR16 = 3'd7
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Priority policy and unit of arbitration: three of each, nine schemes.
  typedef enum logic [1:0] {
    POL_FIXED   = 2'd0,   // by master number, lowest number first
    POL_RR      = 2'd1,   // round robin
    POL_DYNAMIC = 2'd2    // by the notified priority level P_Level
  } policy_e;

  typedef enum logic [1:0] {
    UNIT_TRANSFER    = 2'd0,  // re-arbitrate after every transfer
    UNIT_TRANSACTION = 2'd1,  // re-arbitrate after every burst
    UNIT_LENGTH      = 2'd2   // re-arbitrate after T_Length transfers
  } unit_e;

  // Arbitration configuration of one output stage.  With sm_en set the
  // arbiter chooses the policy and unit itself from the notifications of
  // the masters; base_policy and base_unit apply when nothing is notified.
  typedef struct packed {
    logic    sm_en;
    policy_e base_policy;
    unit_e   base_unit;
  } arb_cfg_t;

  // Address phase of one transfer (address plus control).
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    htrans_e           trans;
    logic              write;
    logic [2:0]        size;
    hburst_e           burst;
    logic [3:0]        prot;
    logic              lock;
  } ahb_aphase_t;

  function automatic logic [SNUM_W-1:0] addr_snum(input logic [ADDR_W-1:0] a);
    return a[SNUM_LSB +: SNUM_W];
  endfunction

  function automatic logic [PLEVEL_W-1:0] addr_plevel(input logic [ADDR_W-1:0] a);
    return a[PLEVEL_LSB +: PLEVEL_W];
  endfunction

  function automatic logic [TLEN_W-1:0] addr_tlen(input logic [ADDR_W-1:0] a);
    return a[TLEN_LSB +: TLEN_W];
  endfunction

  function automatic logic [OFFSET_W-1:0] addr_offset(input logic [ADDR_W-1:0] a);
    return a[OFFSET_W-1:0];
  endfunction

  // Number of beats of a burst; an undefined-length INCR counts as the
  // longest burst, 16 beats.
  function automatic logic [CNT_W-1:0] burst_beats(input hburst_e b);
    unique case (b)
      HBURST_SINGLE:                 return CNT_W'(1);
      HBURST_WRAP4,  HBURST_INCR4:   return CNT_W'(4);
      HBURST_WRAP8,  HBURST_INCR8:   return CNT_W'(8);
      default:                       return CNT_W'(16);
    endcase
  endfunction

  function automatic logic trans_valid(input htrans_e t);
    return t == HTRANS_NONSEQ || t == HTRANS_SEQ;
  endfunction

endpackage
