// ml_ahb_busmatrix: multilayer AHB bus matrix with self-motivated arbiters.
//
// The matrix connects NUM_MASTERS AHB masters to NUM_SLAVES AHB slaves so
// that masters talking to different slaves proceed in parallel. Each
// master port has an input stage, which holds a transfer that cannot be
// started at once, and a decoder, which selects the slave from
// HADDR[31:29] and returns that slave's response. Each slave port has an
// output stage, whose arbiter chooses among the masters that address the
// slave (slave-side arbitration) and whose multiplexer drives the slave
// with the chosen master's transfer. The masters notify the arbiters of
// their priority level (HADDR[28:26]) and desired transfer length
// (HADDR[25:22]) in every address; in self-motivated mode each arbiter
// uses these notifications to choose among nine arbitration schemes (see
// sm_arbiter).
//
// Default size: 4 masters and 2 slaves, 32-bit address and data buses,
// as in the published evaluation set-up; the arbiters accept up to 8
// masters. Masters are AHB-Lite masters (no HBUSREQ/HGRANT); a master
// that loses arbitration sees HREADY low until its transfer is served.
// Slaves are AHB-Lite slaves; each slave's HREADY input is its own
// HREADYOUT, and HMASTER tells it which master owns it. Addresses with
// S_Number >= NUM_SLAVES get a two-cycle ERROR response.
//
// Timing: an arbitration decision takes effect one cycle after it is
// made. An uncontended master that already owns the slave runs
// zero-wait back-to-back transfers through the matrix; a master that must
// win the slave first sees one extra wait state.
module ml_ahb_busmatrix
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned NUM_SLAVES  = 2,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                                  hclk,
  input  logic                                  hresetn,
  // arbitration configuration, one per slave port
  input  arb_cfg_t [NUM_SLAVES-1:0]             cfg,
  // master ports
  input  logic [NUM_MASTERS-1:0][ADDR_W-1:0]    m_haddr,
  input  logic [NUM_MASTERS-1:0][1:0]           m_htrans,
  input  logic [NUM_MASTERS-1:0]                m_hwrite,
  input  logic [NUM_MASTERS-1:0][2:0]           m_hsize,
  input  logic [NUM_MASTERS-1:0][2:0]           m_hburst,
  input  logic [NUM_MASTERS-1:0][3:0]           m_hprot,
  input  logic [NUM_MASTERS-1:0]                m_hmastlock,
  input  logic [NUM_MASTERS-1:0][DATA_W-1:0]    m_hwdata,
  output logic [NUM_MASTERS-1:0]                m_hready,
  output logic [NUM_MASTERS-1:0][1:0]           m_hresp,
  output logic [NUM_MASTERS-1:0][DATA_W-1:0]    m_hrdata,
  // slave ports
  output logic [NUM_SLAVES-1:0]                 s_hsel,
  output logic [NUM_SLAVES-1:0][ADDR_W-1:0]     s_haddr,
  output logic [NUM_SLAVES-1:0][1:0]            s_htrans,
  output logic [NUM_SLAVES-1:0]                 s_hwrite,
  output logic [NUM_SLAVES-1:0][2:0]            s_hsize,
  output logic [NUM_SLAVES-1:0][2:0]            s_hburst,
  output logic [NUM_SLAVES-1:0][3:0]            s_hprot,
  output logic [NUM_SLAVES-1:0]                 s_hmastlock,
  output logic [NUM_SLAVES-1:0][DATA_W-1:0]     s_hwdata,
  output logic [NUM_SLAVES-1:0][IDX_W-1:0]      s_hmaster,
  input  logic [NUM_SLAVES-1:0]                 s_hreadyout,
  input  logic [NUM_SLAVES-1:0][1:0]            s_hresp,
  input  logic [NUM_SLAVES-1:0][DATA_W-1:0]     s_hrdata
);

  ahb_aphase_t [NUM_MASTERS-1:0] m_ap, cur;
  logic        [NUM_MASTERS-1:0] cur_valid, held, def_accept;
  logic [NUM_MASTERS-1:0][NUM_SLAVES-1:0] req_ms, acc_ms;
  logic [NUM_SLAVES-1:0][NUM_MASTERS-1:0] req_sm, acc_sm;
  ahb_aphase_t [NUM_SLAVES-1:0]  s_ap;

  // Crossbar wiring: transpose request and accept matrices.
  always_comb begin
    for (int unsigned m = 0; m < NUM_MASTERS; m++)
      for (int unsigned s = 0; s < NUM_SLAVES; s++) begin
        req_sm[s][m] = req_ms[m][s];
        acc_ms[m][s] = acc_sm[s][m];
      end
  end

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    always_comb begin
      m_ap[m].addr  = m_haddr[m];
      m_ap[m].trans = htrans_e'(m_htrans[m]);
      m_ap[m].write = m_hwrite[m];
      m_ap[m].size  = m_hsize[m];
      m_ap[m].burst = hburst_e'(m_hburst[m]);
      m_ap[m].prot  = m_hprot[m];
      m_ap[m].lock  = m_hmastlock[m];
    end

    ahb_input_stage u_in (
      .clk      (hclk),
      .rst_n    (hresetn),
      .m_ap     (m_ap[m]),
      .hready_m (m_hready[m]),
      .accept   ((|acc_ms[m]) || def_accept[m]),
      .cur      (cur[m]),
      .cur_valid(cur_valid[m]),
      .held     (held[m])
    );

    ahb_decoder #(.NUM_SLAVES(NUM_SLAVES)) u_dec (
      .clk       (hclk),
      .rst_n     (hresetn),
      .cur       (cur[m]),
      .cur_valid (cur_valid[m]),
      .accept_s  (acc_ms[m]),
      .s_hready  (s_hreadyout),
      .s_hresp   (s_hresp),
      .s_hrdata  (s_hrdata),
      .req_s     (req_ms[m]),
      .def_accept(def_accept[m]),
      .hready_m  (m_hready[m]),
      .hresp_m   (m_hresp[m]),
      .hrdata_m  (m_hrdata[m])
    );
  end

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slave
    ahb_output_stage #(.NUM_MASTERS(NUM_MASTERS)) u_out (
      .clk        (hclk),
      .rst_n      (hresetn),
      .cfg        (cfg[s]),
      .m_ap       (cur),
      .m_req      (req_sm[s]),
      .m_hwdata   (m_hwdata),
      .accept     (acc_sm[s]),
      .s_hsel     (s_hsel[s]),
      .s_ap       (s_ap[s]),
      .s_hwdata   (s_hwdata[s]),
      .s_hmaster  (s_hmaster[s]),
      .s_hreadyout(s_hreadyout[s])
    );

    assign s_haddr[s]     = s_ap[s].addr;
    assign s_htrans[s]    = s_ap[s].trans;
    assign s_hwrite[s]    = s_ap[s].write;
    assign s_hsize[s]     = s_ap[s].size;
    assign s_hburst[s]    = s_ap[s].burst;
    assign s_hprot[s]     = s_ap[s].prot;
    assign s_hmastlock[s] = s_ap[s].lock;
  end

endmodule
