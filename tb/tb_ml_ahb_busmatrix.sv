// tb_ml_ahb_busmatrix: end-to-end testbench of the bus matrix, at its
// default size (4 masters, 2 slaves).
//
// Two behavioural SRAM slaves with random wait states sit on the slave
// ports. The four masters are driven by a pipelined AHB-Lite master task
// (address phase of the next beat overlapping the data phase of the
// previous one). Each master writes bursts into its own region of a slave
// and reads them back; read data are compared with a reference memory
// kept by the testbench. The phases are:
//   1. every one of the nine arbitration schemes, and the self-motivated
//      mode, with all four masters running random bursts at once;
//   2. the latency example: masters 1..3 send 4, 8 and 2 transfers with
//      priority levels 1, 7, 4 and desired lengths 4, 8, 2 to slave 0; the
//      slave must serve M2 x8, M3 x2, M1 x4 in 14 consecutive cycles;
//   3. a locked burst that the arbiter may not split;
//   4. an access to an unmapped slave, answered with ERROR.
// Every mechanism of the matrix is counted (held transfers, wait states,
// SEQ-to-NONSEQ rewrite, each scheme, self-motivated choices, locking,
// default-slave errors, both slaves busy at once); one that never
// happened counts as a failure.
module tb_ml_ahb_busmatrix;
  import ahb_pkg::*;

  localparam int NM = 4;
  localparam int NS = 2;
  localparam int DEPTH = 1024;

  logic hclk = 0, hresetn = 0;
  always #5 hclk = ~hclk;

  arb_cfg_t [NS-1:0]             cfg;
  logic [NM-1:0][31:0]           m_haddr, m_hwdata, m_hrdata;
  logic [NM-1:0][1:0]            m_htrans, m_hresp;
  logic [NM-1:0]                 m_hwrite, m_hmastlock, m_hready;
  logic [NM-1:0][2:0]            m_hsize, m_hburst;
  logic [NM-1:0][3:0]            m_hprot;
  logic [NS-1:0]                 s_hsel, s_hwrite, s_hmastlock, s_hreadyout;
  logic [NS-1:0][31:0]           s_haddr, s_hwdata, s_hrdata;
  logic [NS-1:0][1:0]            s_htrans, s_hresp;
  logic [NS-1:0][2:0]            s_hsize, s_hburst;
  logic [NS-1:0][3:0]            s_hprot;
  logic [NS-1:0][1:0]            s_hmaster;
  logic [3:0]                    max_wait [NS];

  ml_ahb_busmatrix dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_mem
    ahb_sram_model #(.DEPTH(DEPTH)) u_mem (
      .hclk, .hresetn, .max_wait(max_wait[s]),
      .hsel(s_hsel[s]), .haddr(s_haddr[s]), .htrans(s_htrans[s]), .hwrite(s_hwrite[s]),
      .hwdata(s_hwdata[s]), .hreadyout(s_hreadyout[s]), .hresp(s_hresp[s]),
      .hrdata(s_hrdata[s])
    );
  end

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [NS][DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---- pipelined AHB-Lite master --------------------------------------
  // One burst of `beats` word transfers from word offset `word`.
  task automatic burst(input int m, input int snum, input int pl, input int tl,
                       input int word, input int beats, input hburst_e hb,
                       input bit wr, input bit lock, input bit expect_err);
    int ai = 0, di = -1;
    bit done = 0;
    while (!done) begin
      if (ai < beats) begin
        m_haddr[m]     = {3'(snum), 3'(pl), 4'(tl), 22'((word + ai) * 4)};
        m_htrans[m]    = (ai == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
        m_hwrite[m]    = wr;
        m_hsize[m]     = 3'd2;
        m_hburst[m]    = hb;
        m_hprot[m]     = 4'h3;
        m_hmastlock[m] = lock;
      end else begin
        m_htrans[m]    = HTRANS_IDLE;
        m_hmastlock[m] = 1'b0;
      end
      if (di >= 0 && wr) m_hwdata[m] = {8'(m), 8'(snum), 16'(word + di)} ^ 32'h5A00_0000;
      @(negedge hclk);
      if (m_hready[m]) begin
        if (di >= 0) begin
          if (expect_err) begin
            check(m_hresp[m] == HRESP_ERROR, $sformatf("M%0d expected ERROR", m));
          end else begin
            check(m_hresp[m] == HRESP_OKAY, $sformatf("M%0d response %0d", m, m_hresp[m]));
            if (wr) ref_mem[snum][word + di] = m_hwdata[m];
            else check(m_hrdata[m] == ref_mem[snum][word + di],
                       $sformatf("M%0d read S%0d[%0d] = %h, expected %h", m, snum, word + di,
                                 m_hrdata[m], ref_mem[snum][word + di]));
          end
        end
        di = (ai < beats) ? ai : -1;
        if (ai < beats) ai++;
        if (di < 0) done = 1;
      end
      @(posedge hclk);
      #1;
    end
  endtask

  function automatic hburst_e hb_of(input int beats);
    case (beats)
      1: return HBURST_SINGLE;
      4: return HBURST_INCR4;
      8: return HBURST_INCR8;
      16: return HBURST_INCR16;
      default: return HBURST_INCR;
    endcase
  endfunction

  // Random write-then-read traffic of one master.
  task automatic traffic(input int m, input int n, input bit notify);
    for (int t = 0; t < n; t++) begin
      int s, beats, word, pl, tl, k;
      s     = $urandom_range(0, NS - 1);
      k     = $urandom_range(0, 4);
      beats = (k == 0) ? 1 : (k == 1) ? 4 : (k == 2) ? 8 : (k == 3) ? 3 : 16;
      word  = m * 256 + (t % 15) * 16;
      pl    = notify ? $urandom_range(0, 7) : 0;
      tl    = notify ? $urandom_range(0, 15) : 0;
      burst(m, s, pl, tl, word, beats, hb_of(beats), 1'b1, 1'b0, 1'b0);
      repeat ($urandom_range(0, 2)) @(posedge hclk);
      #1;
      burst(m, s, pl, tl, word, beats, hb_of(beats), 1'b0, 1'b0, 1'b0);
    end
  endtask

  // ---- mechanism counters ---------------------------------------------
  int n_held = 0, n_wait = 0, n_rewrite = 0, n_sm_dyn = 0, n_sm_len = 0;
  int n_lock = 0, n_err = 0, n_parallel = 0, n_noport = 0;
  int n_scheme [3][3];
  int slave0_seq[$];
  int slave0_cyc[$];
  int cyc = 0;
  bit record0 = 0;

  task automatic count_slave(input bit ge, input policy_e pol, input unit_e un,
                             input bit sm, input bit lk);
    if (ge) begin
      n_scheme[int'(pol)][int'(un)]++;
      if (sm && pol == POL_DYNAMIC) n_sm_dyn++;
      if (sm && un == UNIT_LENGTH)  n_sm_len++;
    end
    if (lk) n_lock++;
  endtask

  always @(negedge hclk) if (hresetn) begin
    cyc++;
    if (dut.held != 0) n_held++;
    for (int s = 0; s < NS; s++) begin
      if (!s_hreadyout[s]) n_wait++;
      if (!s_hsel[s]) n_noport++;
    end
    for (int m = 0; m < NM; m++) if (m_hresp[m] == HRESP_ERROR && m_hready[m]) n_err++;
    if (s_htrans[0][1] && s_hreadyout[0] && s_htrans[1][1] && s_hreadyout[1]) n_parallel++;
    if (dut.g_slave[0].u_out.own_req && dut.g_slave[0].u_out.own_ap.trans == HTRANS_SEQ &&
        s_htrans[0] == HTRANS_NONSEQ) n_rewrite++;
    if (dut.g_slave[1].u_out.own_req && dut.g_slave[1].u_out.own_ap.trans == HTRANS_SEQ &&
        s_htrans[1] == HTRANS_NONSEQ) n_rewrite++;
    count_slave(dut.g_slave[0].u_out.u_arb.grant_evt, dut.g_slave[0].u_out.u_arb.policy,
                dut.g_slave[0].u_out.u_arb.unit, cfg[0].sm_en,
                dut.g_slave[0].u_out.u_arb.locked && s_hreadyout[0]);
    count_slave(dut.g_slave[1].u_out.u_arb.grant_evt, dut.g_slave[1].u_out.u_arb.policy,
                dut.g_slave[1].u_out.u_arb.unit, cfg[1].sm_en,
                dut.g_slave[1].u_out.u_arb.locked && s_hreadyout[1]);
    if (record0 && s_htrans[0][1] && s_hreadyout[0]) begin
      slave0_seq.push_back(int'(s_hmaster[0]));
      slave0_cyc.push_back(cyc);
    end
  end

  function automatic string seq_str(input int q[$]);
    string s = "";
    foreach (q[i]) s = {s, $sformatf("%0d", q[i])};
    return s;
  endfunction

  initial begin
    for (int s = 0; s < NS; s++) begin
      max_wait[s] = 0;
      cfg[s] = '{sm_en: 1'b0, base_policy: POL_FIXED, base_unit: UNIT_TRANSFER};
      for (int i = 0; i < DEPTH; i++) ref_mem[s][i] = 32'h0;
    end
    for (int p = 0; p < 3; p++) for (int u = 0; u < 3; u++) n_scheme[p][u] = 0;
    m_haddr = '0; m_htrans = '0; m_hwrite = '0; m_hsize = '0; m_hburst = '0;
    m_hprot = '0; m_hmastlock = '0; m_hwdata = '0;
    repeat (3) @(posedge hclk);
    #1 hresetn = 1;

    // 1. Nine schemes, then the self-motivated mode.
    for (int sc = 0; sc < 10; sc++) begin
      for (int s = 0; s < NS; s++) begin
        cfg[s].sm_en       = (sc == 9);
        cfg[s].base_policy = policy_e'((sc == 9) ? int'(POL_RR) : sc / 3);
        cfg[s].base_unit   = unit_e'((sc == 9) ? int'(UNIT_TRANSACTION) : sc % 3);
        max_wait[s]        = 4'($urandom_range(0, 2));
      end
      fork
        traffic(0, 4, sc >= 6);
        traffic(1, 4, sc >= 6);
        traffic(2, 4, sc >= 6);
        traffic(3, 4, sc >= 6);
      join
      repeat (2) @(posedge hclk);
      #1;
    end

    // 2. The latency example on slave 0, no wait states.
    for (int s = 0; s < NS; s++) begin
      max_wait[s] = 0;
      cfg[s] = '{sm_en: 1'b1, base_policy: POL_FIXED, base_unit: UNIT_TRANSFER};
    end
    repeat (3) @(posedge hclk);
    #1 record0 = 1;
    fork
      burst(1, 0, 1, 4, 900, 4, HBURST_INCR4, 1'b1, 1'b0, 1'b0);
      burst(2, 0, 7, 8, 910, 8, HBURST_INCR8, 1'b1, 1'b0, 1'b0);
      burst(3, 0, 4, 2, 920, 2, HBURST_INCR,  1'b1, 1'b0, 1'b0);
    join
    record0 = 0;
    check(seq_str(slave0_seq) == "22222222331111",
          $sformatf("latency example order %s", seq_str(slave0_seq)));
    check(slave0_cyc.size() == 14 && slave0_cyc[13] - slave0_cyc[0] == 13,
          "latency example served in 14 consecutive cycles");
    slave0_seq.delete(); slave0_cyc.delete();

    // 3. A locked burst is not split, even per transfer.
    for (int s = 0; s < NS; s++)
      cfg[s] = '{sm_en: 1'b0, base_policy: POL_FIXED, base_unit: UNIT_TRANSFER};
    repeat (2) @(posedge hclk);
    #1 record0 = 1;
    fork
      burst(0, 0, 0, 0, 940, 4, HBURST_INCR4, 1'b1, 1'b1, 1'b0);
      burst(1, 0, 0, 0, 950, 4, HBURST_INCR4, 1'b1, 1'b0, 1'b0);
    join
    record0 = 0;
    check(seq_str(slave0_seq) == "00001111", $sformatf("locked order %s", seq_str(slave0_seq)));
    burst(0, 0, 0, 0, 940, 4, HBURST_INCR4, 1'b0, 1'b0, 1'b0);
    burst(1, 0, 0, 0, 950, 4, HBURST_INCR4, 1'b0, 1'b0, 1'b0);

    // 4. Unmapped slave number 5: ERROR from the default slave.
    burst(2, 5, 0, 0, 0, 1, HBURST_SINGLE, 1'b0, 1'b0, 1'b1);

    // Slave-side protocol checks.
    check(g_mem[0].u_mem.n_errors == 0 && g_mem[1].u_mem.n_errors == 0,
          "address phase stable during wait states");

    // Every mechanism must have happened.
    check(n_held > 0,     "held transfers (master stalled by arbitration)");
    check(n_wait > 0,     "slave wait states");
    check(n_rewrite > 0,  "SEQ-to-NONSEQ rewrite after a change of owner");
    check(n_sm_dyn > 0,   "self-motivated choice of dynamic priority");
    check(n_sm_len > 0,   "self-motivated choice of desired length");
    check(n_lock > 0,     "locked transfers kept the slave");
    check(n_err > 0,      "default-slave ERROR response");
    check(n_parallel > 0, "both slaves serving in the same cycle");
    check(n_noport > 0,   "NoPort (no master selected)");
    for (int p = 0; p < 3; p++)
      for (int u = 0; u < 3; u++)
        check(n_scheme[p][u] > 0, $sformatf("scheme policy %0d unit %0d used", p, u));
    $display("mechanisms: held=%0d wait=%0d rewrite=%0d sm_dyn=%0d sm_len=%0d lock=%0d err=%0d parallel=%0d noport=%0d",
             n_held, n_wait, n_rewrite, n_sm_dyn, n_sm_len, n_lock, n_err, n_parallel, n_noport);
    $display("cycles=%0d transfers S0=%0d S1=%0d", cyc,
             g_mem[0].u_mem.n_transfers, g_mem[1].u_mem.n_transfers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
