// tb_ahb_output_stage: directed, self-checking testbench of an output stage.
//
// Four masters, fixed priority per transfer. The test checks that:
//   * with no request the slave sees IDLE and no master is accepted;
//   * a request is granted one cycle later, the slave then sees the
//     owner's control and only the offset part of the address, HMASTER
//     names the owner, and the transfer is accepted;
//   * the owner's write data reaches the slave in the following cycle;
//   * a slave wait state blocks acceptance and keeps the owner;
//   * a SEQ transfer from a master that did not own the slave before is
//     presented as NONSEQ with HBURST INCR;
//   * two requesters alternate transfer by transfer.
module tb_ahb_output_stage;
  import ahb_pkg::*;
  localparam int NM = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  arb_cfg_t                     cfg;
  ahb_aphase_t [NM-1:0]         m_ap;
  logic        [NM-1:0]         m_req, accept;
  logic [NM-1:0][DATA_W-1:0]    m_hwdata;
  logic                         s_hsel;
  ahb_aphase_t                  s_ap;
  logic [DATA_W-1:0]            s_hwdata;
  logic [1:0]                   s_hmaster;
  logic                         s_hreadyout;

  ahb_output_stage #(.NUM_MASTERS(NM)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ahb_aphase_t mk(input int pl, input int tl, input int off,
                                     input htrans_e tr, input hburst_e b, input bit w);
    ahb_aphase_t a = '0;
    a.addr  = {3'd0, 3'(pl), 4'(tl), 22'(off)};
    a.trans = tr; a.burst = b; a.write = w; a.size = 3'd2; a.prot = 4'h3;
    return a;
  endfunction

  initial begin
    cfg = '{sm_en: 1'b0, base_policy: POL_FIXED, base_unit: UNIT_TRANSFER};
    m_req = '0; s_hreadyout = 1;
    for (int m = 0; m < NM; m++) begin
      m_ap[m] = '0; m_hwdata[m] = 32'hD000_0000 + m;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1;
    check(s_ap.trans == HTRANS_IDLE && accept == 0 && !s_hsel, "idle after reset");

    // Master 2 asks: not accepted in the first cycle, granted in the next.
    m_ap[2] = mk(5, 3, 'h1234, HTRANS_NONSEQ, HBURST_SINGLE, 1'b1);
    m_req[2] = 1;
    #1 check(accept == 0, "no acceptance before the grant");
    @(posedge clk); #1;
    check(s_hsel && s_hmaster == 2, "master 2 owns the slave");
    check(s_ap.trans == HTRANS_NONSEQ && s_ap.write && s_ap.addr == 32'h1234,
          $sformatf("slave sees owner's transfer, addr %h", s_ap.addr));
    check(accept == 4'b0100, "master 2 accepted");
    // Wait state: not accepted, owner kept.
    s_hreadyout = 0;
    #1 check(accept == 0, "no acceptance in a wait state");
    @(posedge clk); #1;
    check(s_hmaster == 2 && s_ap.addr == 32'h1234, "owner kept in a wait state");
    s_hreadyout = 1;
    @(posedge clk); #1;
    m_req[2] = 0;
    #1 check(s_hwdata == 32'hD000_0002, $sformatf("write data of master 2, %h", s_hwdata));
    check(s_ap.trans == HTRANS_IDLE, "owner without request gives IDLE");

    // Master 1 continues a burst with SEQ: first beat becomes NONSEQ/INCR.
    m_ap[1] = mk(0, 0, 'h40, HTRANS_SEQ, HBURST_INCR4, 1'b0);
    m_req[1] = 1;
    @(posedge clk); #1;
    check(s_hmaster == 1 && s_ap.trans == HTRANS_NONSEQ && s_ap.burst == HBURST_INCR,
          $sformatf("SEQ rewritten: trans %0d burst %0d", s_ap.trans, s_ap.burst));
    @(posedge clk); #1;
    check(s_hmaster == 1 && s_ap.trans == HTRANS_SEQ && s_ap.burst == HBURST_INCR4,
          "later SEQ beats pass unchanged");

    // Masters 1 and 3 both ask: they alternate per transfer.
    m_ap[3] = mk(0, 0, 'h80, HTRANS_NONSEQ, HBURST_SINGLE, 1'b1);
    m_ap[1] = mk(0, 0, 'h44, HTRANS_NONSEQ, HBURST_SINGLE, 1'b1);
    m_req[3] = 1;
    begin
      int seq[$];
      string got = "";
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        for (int m = 0; m < NM; m++) if (accept[m]) seq.push_back(m);
      end
      foreach (seq[i]) got = {got, $sformatf("%0d", seq[i])};
      check(got == "1313", $sformatf("alternation %s", got));
    end

    // Random traffic, round robin per transfer, random wait states.
    // Checked every cycle: at most one acceptance, only for the owner and
    // only when it requests and the slave is ready; the slave sees the
    // owner's transfer with the upper address bits cleared; write data
    // come from the master accepted one slave-ready cycle earlier; no
    // requester sees more than NM-1 other transfers before its own.
    cfg = '{sm_en: 1'b0, base_policy: POL_RR, base_unit: UNIT_TRANSFER};
    begin
      int wait_cnt [NM];
      int last_acc = -1;
      for (int m = 0; m < NM; m++) wait_cnt[m] = 0;
      for (int t = 0; t < 2000; t++) begin
        @(posedge clk); #1;
        for (int m = 0; m < NM; m++) begin
          if (!m_req[m] || accept[m]) begin
            m_req[m] = $urandom_range(0, 1);
            m_ap[m]  = mk($urandom_range(0, 7), $urandom_range(0, 15), $urandom_range(0, 4095),
                          HTRANS_NONSEQ, HBURST_SINGLE, $urandom_range(0, 1));
            m_ap[m].addr[31:29] = 3'($urandom_range(0, 7));
            m_hwdata[m] = $urandom;
          end
        end
        s_hreadyout = $urandom_range(0, 3) != 0;
        #1;
        check($onehot0(accept), "at most one acceptance");
        for (int m = 0; m < NM; m++)
          if (accept[m])
            check(m_req[m] && s_hreadyout && s_hmaster == m && s_hsel &&
                  s_ap.addr == {10'd0, m_ap[m].addr[21:0]} && s_ap.write == m_ap[m].write,
                  $sformatf("t=%0d acceptance of master %0d", t, m));
        if (last_acc >= 0)
          check(s_hwdata == m_hwdata[last_acc], $sformatf("t=%0d write data of master %0d", t, last_acc));
        @(negedge clk);
        for (int m = 0; m < NM; m++) begin
          if (m_req[m] && !accept[m] && accept != 0) wait_cnt[m]++;
          if (accept[m] || !m_req[m]) wait_cnt[m] = 0;
          check(wait_cnt[m] <= NM - 1, $sformatf("t=%0d master %0d starved", t, m));
        end
        if (s_hreadyout) last_acc = (accept != 0) ? $clog2(int'(accept)) : -1;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
