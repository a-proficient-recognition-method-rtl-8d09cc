// tb_ahb_decoder: self-checking testbench of the master-side decoder.
//
// Two slaves. Offered transfers carry random S_Number values 0..3, so
// some address an unmapped slave. Acceptance by the addressed output stage
// is random, as are the slaves' HREADY, HRESP and HRDATA. A reference
// kept here follows the master's data phase (none, waiting in the input
// stage, on a slave, or the two ERROR cycles of the default slave) and
// predicts the request lines, the default-slave acceptance and the
// response seen by the master, compared every cycle.
module tb_ahb_decoder;
  import ahb_pkg::*;
  localparam int NS = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_aphase_t                   cur;
  logic                          cur_valid;
  logic [NS-1:0]                 accept_s, s_hready, req_s;
  logic [NS-1:0][1:0]            s_hresp;
  logic [NS-1:0][DATA_W-1:0]     s_hrdata;
  logic                          def_accept, hready_m;
  logic [1:0]                    hresp_m;
  logic [DATA_W-1:0]             hrdata_m;

  ahb_decoder #(.NUM_SLAVES(NS)) dut (.*);

  int checks = 0, failures = 0;
  // Reference data-phase state: 0 none, 1 waiting, 2 on slave, 3/4 error.
  int st, dsl;
  int n_err = 0, n_wait = 0, n_slave = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    cur = '0; cur_valid = 0; accept_s = '0; s_hready = '1; s_hresp = '0; s_hrdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    st = 0; dsl = 0;
    for (int t = 0; t < 4000; t++) begin
      bit e_ready; logic [1:0] e_resp; logic [31:0] e_data;
      int sn;
      // Slave responses.
      for (int s = 0; s < NS; s++) begin
        s_hready[s] = $urandom_range(0, 2) != 0;
        s_hresp[s]  = 2'($urandom_range(0, 1));
        s_hrdata[s] = $urandom;
      end
      // Expected response for the current data phase.
      e_ready = 1; e_resp = 0; e_data = 0;
      case (st)
        1: e_ready = 0;
        2: begin e_ready = s_hready[dsl]; e_resp = s_hresp[dsl]; e_data = s_hrdata[dsl]; end
        3: begin e_ready = 0; e_resp = 1; end
        4: begin e_ready = 1; e_resp = 1; end
        default: ;
      endcase
      // Offered transfer: kept while waiting, new when the master may issue.
      if (st != 1) begin
        cur_valid = e_ready && ($urandom_range(0, 3) != 0);
        cur.addr  = {3'($urandom_range(0, 3)), 29'($urandom)};
        cur.trans = HTRANS_NONSEQ;
      end
      sn = int'(cur.addr[31:29]);
      accept_s = '0;
      if (cur_valid && sn < NS && $urandom_range(0, 1)) accept_s[sn] = 1'b1;
      #2;
      check(hready_m == e_ready && hresp_m == e_resp && hrdata_m == e_data,
            $sformatf("t=%0d st=%0d response %0d/%0d/%h exp %0d/%0d/%h", t, st,
                      hready_m, hresp_m, hrdata_m, e_ready, e_resp, e_data));
      for (int s = 0; s < NS; s++)
        check(req_s[s] == (cur_valid && sn == s), $sformatf("t=%0d req_s[%0d]", t, s));
      check(def_accept == (cur_valid && sn >= NS), $sformatf("t=%0d def_accept", t));
      @(posedge clk);
      if (e_ready) begin
        if (!cur_valid)           st = 0;
        else if (sn >= NS)        begin st = 3; n_err++; end
        else if (accept_s != 0)   begin st = 2; dsl = sn; n_slave++; end
        else                      begin st = 1; n_wait++; end
      end else if (st == 1 && accept_s != 0) begin
        st = 2; dsl = sn;
      end else if (st == 3) st = 4;
      #1;
    end
    check(n_err > 10 && n_wait > 10 && n_slave > 10, "all data-phase kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
