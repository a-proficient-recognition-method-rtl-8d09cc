// tb_sm_arbiter: self-checking testbench of the self-motivated arbiter.
//
// A small request model stands in for the masters: each master has a
// number of transfers to do, a burst length, a lock flag and the P_Level
// and T_Length it notifies. Every cycle in which the slave is ready and
// the owner requests, one transfer of the owner is served. The order in
// which transfers are served, and the cycle of each master's last one,
// are compared with sequences worked out by hand:
//   * the three panels of the latency example (masters 1..3 with 4, 8 and
//     2 transfers, latency limits 14, 8 and 10 cycles):
//     (a) fixed priority by desired length: M1 x4, M2 x8, M3 x2,
//         finishing at cycles 4, 12, 14;
//     (b) dynamic priority favouring M3: M3 x2, M1 x4, M2 x8 (2, 6, 14);
//     (c) self-motivated, levels M2 > M3 > M1: M2 x8, M3 x2, M1 x4
//         (8, 10, 14), every master within its limit;
//   * round robin per transfer, fixed priority per transaction (INCR4),
//     a locked sequence, and (c) again with random slave wait states.
module tb_sm_arbiter;
  import ahb_pkg::*;

  localparam int NM = 8;
  localparam int IW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  arb_cfg_t                   cfg;
  logic                       hready;
  logic [NM-1:0]              req;
  logic [NM-1:0][PLEVEL_W-1:0] level;
  logic [NM-1:0][TLEN_W-1:0]  tlen;
  htrans_e                    own_trans;
  hburst_e                    own_burst;
  logic                       own_lock;
  logic                       noport;
  logic [IW-1:0]              master_no;
  policy_e                    cur_policy;
  unit_e                      cur_unit;
  logic                       grant_evt;

  sm_arbiter #(.NUM_MASTERS(NM)) dut (.*);

  int checks = 0, failures = 0;
  int work[NM], blen[NM], beat[NM];
  logic lockm[NM];
  int served[$];
  int last_cyc[NM];
  int cyc;
  logic rand_ready;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Model outputs, recomputed from the model state and the grant.
  always_comb begin
    for (int m = 0; m < NM; m++) req[m] = work[m] > 0;
    own_trans = (beat[master_no] == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
    own_burst = (blen[master_no] == 4) ? HBURST_INCR4 :
                (blen[master_no] == 8) ? HBURST_INCR8 : HBURST_SINGLE;
    own_lock  = lockm[master_no] && work[master_no] > 1;
  end

  task automatic clear_model();
    for (int m = 0; m < NM; m++) begin
      work[m] = 0; blen[m] = 1; beat[m] = 0; lockm[m] = 0;
      level[m] = '0; tlen[m] = '0; last_cyc[m] = -1;
    end
    served.delete();
  endtask

  // Reset, then serve until no work is left (or a cycle limit).
  task automatic run(input int limit);
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (cyc < limit) begin
      int pending = 0;
      bit serve;
      int sm;
      for (int m = 0; m < NM; m++) pending += work[m];
      if (pending == 0) break;
      hready = rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
      // Decide from settled signals, update the model after the edge.
      @(negedge clk);
      serve = hready && !noport && req[master_no];
      sm    = int'(master_no);
      @(posedge clk);
      #1;
      if (serve) begin
        served.push_back(sm);
        work[sm]--;
        beat[sm] = (beat[sm] + 1) % blen[sm];
        last_cyc[sm] = cyc;
      end
      cyc++;
    end
  endtask

  function automatic string seq_str(input int q[$]);
    string s = "";
    foreach (q[i]) s = {s, $sformatf("%0d", q[i])};
    return s;
  endfunction

  task automatic expect_seq(input string exp, input string name);
    check(seq_str(served) == exp,
          $sformatf("%s: served %s, expected %s", name, seq_str(served), exp));
  endtask

  // The three masters of the latency example: M1..M3 with 4, 8, 2.
  task automatic example_setup();
    clear_model();
    work[1] = 4; work[2] = 8; work[3] = 2;
    tlen[1] = 4; tlen[2] = 8; tlen[3] = 2;
  endtask

  initial begin
    hready = 1; rand_ready = 0;
    cfg = '{sm_en: 1'b0, base_policy: POL_FIXED, base_unit: UNIT_LENGTH};

    // (a) no latency awareness: fixed priority, ascending order.
    example_setup();
    run(100);
    expect_seq("11112222222233", "fig (a)");
    check(last_cyc[1] == 4 && last_cyc[2] == 12 && last_cyc[3] == 14,
          $sformatf("fig (a) end cycles %0d %0d %0d", last_cyc[1], last_cyc[2], last_cyc[3]));

    // (b) latency minimising: M3 first, then M1, then M2.
    example_setup();
    cfg = '{sm_en: 1'b0, base_policy: POL_DYNAMIC, base_unit: UNIT_LENGTH};
    level[3] = 3; level[1] = 2; level[2] = 1;
    run(100);
    expect_seq("33111122222222", "fig (b)");
    check(last_cyc[3] == 2 && last_cyc[1] == 6 && last_cyc[2] == 14,
          $sformatf("fig (b) end cycles %0d %0d %0d", last_cyc[1], last_cyc[2], last_cyc[3]));

    // (c) self-motivated: the arbiter picks dynamic priority and length.
    example_setup();
    cfg = '{sm_en: 1'b1, base_policy: POL_FIXED, base_unit: UNIT_TRANSFER};
    level[1] = 1; level[2] = 7; level[3] = 4;
    run(100);
    expect_seq("22222222331111", "fig (c)");
    check(last_cyc[2] == 8 && last_cyc[3] == 10 && last_cyc[1] == 14,
          $sformatf("fig (c) end cycles %0d %0d %0d", last_cyc[1], last_cyc[2], last_cyc[3]));
    check(last_cyc[2] <= 8 && last_cyc[3] <= 10 && last_cyc[1] <= 14, "fig (c) latency limits");

    // Self-motivated with nothing notified: falls back to the base scheme.
    clear_model();
    work[0] = 3; work[5] = 3;
    cfg = '{sm_en: 1'b1, base_policy: POL_RR, base_unit: UNIT_TRANSFER};
    run(100);
    expect_seq("505050", "sm fallback to round robin per transfer");

    // Round robin per transfer among three masters.
    clear_model();
    work[2] = 2; work[4] = 2; work[6] = 2;
    cfg = '{sm_en: 1'b0, base_policy: POL_RR, base_unit: UNIT_TRANSFER};
    run(100);
    expect_seq("246246", "round robin per transfer");

    // Fixed priority per transaction (INCR4 bursts): whole bursts.
    clear_model();
    work[0] = 8; blen[0] = 4; work[1] = 4; blen[1] = 4;
    cfg = '{sm_en: 1'b0, base_policy: POL_FIXED, base_unit: UNIT_TRANSACTION};
    run(100);
    expect_seq("000011110000", "fixed priority per transaction");

    // Same traffic per transfer: the owner hands over after each one.
    clear_model();
    work[0] = 4; blen[0] = 4; work[1] = 2; blen[1] = 4;
    cfg = '{sm_en: 1'b0, base_policy: POL_FIXED, base_unit: UNIT_TRANSFER};
    run(100);
    expect_seq("010100", "fixed priority per transfer");

    // A locked sequence keeps the slave.
    clear_model();
    work[1] = 4; lockm[1] = 1; work[2] = 2;
    run(100);
    expect_seq("111122", "locked transfers");

    // A lone master keeps the slave with no idle cycle between transfers.
    clear_model();
    work[3] = 5;
    run(100);
    expect_seq("33333", "lone master");
    check(last_cyc[3] == 5, $sformatf("lone master back to back, ended %0d", last_cyc[3]));

    // (c) with random wait states: same order.
    example_setup();
    cfg = '{sm_en: 1'b1, base_policy: POL_FIXED, base_unit: UNIT_TRANSFER};
    level[1] = 1; level[2] = 7; level[3] = 4;
    rand_ready = 1;
    run(400);
    expect_seq("22222222331111", "fig (c) with wait states");
    rand_ready = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
