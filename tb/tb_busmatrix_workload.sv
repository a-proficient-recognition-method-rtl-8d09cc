// tb_busmatrix_workload: processor-and-DMA workload on the bus matrix at
// its default size (4 masters, 2 slaves), compared across schemes.
//
// Masters 0 and 1 behave like processors: single-word writes, each read
// back at once, to either slave, with short random gaps. They are
// latency-sensitive and notify priority level 7 and length 1. Masters 2
// and 3 behave like DMA engines: INCR16 write bursts, each read back as
// an INCR16 burst, notifying level 1 and desired length 4. Both slaves
// insert 0..1 random wait states.
//
// The same traffic (same random sequence) runs under three schemes:
//   A fixed priority per transaction, B round robin per transaction,
//   C self-motivated (base: round robin per transaction).
// For each run the testbench checks every read against a reference
// memory and reports the cycles taken, the slave throughput and the worst
// single-transfer latency seen by a processor master. Under C the
// notified levels and lengths let a processor access cut into a DMA
// stream after at most 4 DMA transfers, so the processors' worst latency
// must be lower than under B, where a whole 16-beat burst is in the way.
module tb_busmatrix_workload;
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
  int cyc = 0;
  always @(posedge hclk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Pipelined AHB-Lite master: one burst; returns the cycles from the
  // first address phase to the end of the first data phase.
  task automatic burst(input int m, input int snum, input int pl, input int tl,
                       input int word, input int beats, input hburst_e hb,
                       input bit wr, input logic [31:0] tag, output int first_lat);
    int ai = 0, di = -1, t0;
    bit done = 0;
    t0 = cyc;
    first_lat = -1;
    while (!done) begin
      if (ai < beats) begin
        m_haddr[m]  = {3'(snum), 3'(pl), 4'(tl), 22'((word + ai) * 4)};
        m_htrans[m] = (ai == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
        m_hwrite[m] = wr;
        m_hsize[m]  = 3'd2;
        m_hburst[m] = hb;
        m_hprot[m]  = 4'h3;
      end else begin
        m_htrans[m] = HTRANS_IDLE;
      end
      if (di >= 0 && wr) m_hwdata[m] = tag ^ 32'(word + di);
      @(negedge hclk);
      if (m_hready[m]) begin
        if (di >= 0) begin
          if (first_lat < 0) first_lat = cyc - t0;
          check(m_hresp[m] == HRESP_OKAY, $sformatf("M%0d response", m));
          if (wr) ref_mem[snum][word + di] = m_hwdata[m];
          else check(m_hrdata[m] == ref_mem[snum][word + di],
                     $sformatf("M%0d read S%0d[%0d] = %h, expected %h", m, snum,
                               word + di, m_hrdata[m], ref_mem[snum][word + di]));
        end
        di = (ai < beats) ? ai : -1;
        if (ai < beats) ai++;
        if (di < 0) done = 1;
      end
      @(posedge hclk);
      #1;
    end
  endtask

  int cpu_max_lat;

  task automatic cpu(input int m, input int n, input int seed, input logic [31:0] tag);
    int lat;
    process::self().srandom(seed);
    for (int t = 0; t < n; t++) begin
      int s, word;
      s    = $urandom_range(0, NS - 1);
      word = 512 + m * 64 + (t % 64);
      burst(m, s, 7, 1, word, 1, HBURST_SINGLE, 1'b1, tag, lat);
      if (lat > cpu_max_lat) cpu_max_lat = lat;
      burst(m, s, 7, 1, word, 1, HBURST_SINGLE, 1'b0, tag, lat);
      if (lat > cpu_max_lat) cpu_max_lat = lat;
      repeat ($urandom_range(0, 3)) @(posedge hclk);
      #1;
    end
  endtask

  task automatic dma(input int m, input int n, input int seed, input logic [31:0] tag);
    int lat;
    process::self().srandom(seed);
    for (int t = 0; t < n; t++) begin
      int s, word;
      s    = $urandom_range(0, NS - 1);
      word = (m - 2) * 256 + (t % 16) * 16;
      burst(m, s, 1, 4, word, 16, HBURST_INCR16, 1'b1, tag, lat);
      burst(m, s, 1, 4, word, 16, HBURST_INCR16, 1'b0, tag, lat);
    end
  endtask

  int lat_run [3];
  int cyc_run [3];

  initial begin
    m_haddr = '0; m_htrans = '0; m_hwrite = '0; m_hsize = '0; m_hburst = '0;
    m_hprot = '0; m_hmastlock = '0; m_hwdata = '0;
    for (int s = 0; s < NS; s++) begin
      max_wait[s] = 4'd1;
      for (int i = 0; i < DEPTH; i++) ref_mem[s][i] = 32'h0;
    end
    for (int run = 0; run < 3; run++) begin
      int c0, n0;
      for (int s = 0; s < NS; s++)
        cfg[s] = (run == 0) ? '{sm_en: 1'b0, base_policy: POL_FIXED, base_unit: UNIT_TRANSACTION} :
                 (run == 1) ? '{sm_en: 1'b0, base_policy: POL_RR,    base_unit: UNIT_TRANSACTION} :
                              '{sm_en: 1'b1, base_policy: POL_RR,    base_unit: UNIT_TRANSACTION};
      hresetn = 0;
      repeat (3) @(posedge hclk);
      #1 hresetn = 1;
      cpu_max_lat = 0;
      c0 = cyc;
      n0 = g_mem[0].u_mem.n_transfers + g_mem[1].u_mem.n_transfers;
      fork
        cpu(0, 30, 11, 32'hC000_0000 + run);
        cpu(1, 30, 12, 32'hC100_0000 + run);
        dma(2, 6, 13, 32'hD200_0000 + run);
        dma(3, 6, 14, 32'hD300_0000 + run);
      join
      cyc_run[run] = cyc - c0;
      lat_run[run] = cpu_max_lat;
      $display("run %0d: %0d cycles, %0d transfers, worst processor latency %0d cycles",
               run, cyc_run[run],
               g_mem[0].u_mem.n_transfers + g_mem[1].u_mem.n_transfers - n0, cpu_max_lat);
      // Transfers: 2 x 30 x 2 singles + 2 x 6 x 32 burst beats = 504.
      check(g_mem[0].u_mem.n_transfers + g_mem[1].u_mem.n_transfers - n0 == 504,
            "all transfers reached the slaves");
    end
    check(lat_run[2] < lat_run[1],
          $sformatf("self-motivated worst processor latency %0d below round robin's %0d",
                    lat_run[2], lat_run[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
