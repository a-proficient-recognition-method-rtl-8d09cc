// tb_ahb_input_stage: self-checking testbench of the input stage.
//
// Random address phases, random HREADY towards the master and random
// acceptance are applied. A reference kept here tracks whether a
// transfer has been sampled but not taken, and with which address and
// control. After every edge the offered transfer (cur, cur_valid) and the
// held flag are compared with it. Acceptance is only given when a
// transfer is offered, and HREADY is held low while one is held, as the
// decoder does in the matrix.
module tb_ahb_input_stage;
  import ahb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ahb_aphase_t m_ap, cur;
  logic        hready_m, accept, cur_valid, held;

  ahb_input_stage dut (.*);

  int checks = 0, failures = 0;
  bit          r_held;
  ahb_aphase_t r_ap;
  int          n_held = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    m_ap = '0; hready_m = 1; accept = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    r_held = 0; r_ap = '0;
    for (int t = 0; t < 3000; t++) begin
      bit lv, exp_valid;
      ahb_aphase_t exp_cur;
      // Stimulus for this cycle.
      m_ap.addr  = $urandom;
      m_ap.trans = htrans_e'($urandom_range(0, 3));
      m_ap.write = $urandom_range(0, 1);
      m_ap.size  = 3'd2;
      m_ap.burst = hburst_e'($urandom_range(0, 7));
      m_ap.prot  = 4'($urandom);
      m_ap.lock  = $urandom_range(0, 1);
      hready_m   = r_held ? 1'b0 : ($urandom_range(0, 3) != 0);
      lv         = hready_m && (m_ap.trans inside {HTRANS_NONSEQ, HTRANS_SEQ});
      exp_valid  = r_held || lv;
      exp_cur    = r_held ? r_ap : m_ap;
      accept     = exp_valid && ($urandom_range(0, 2) == 0);
      #2;
      check(cur_valid == exp_valid, $sformatf("t=%0d cur_valid %0d exp %0d", t, cur_valid, exp_valid));
      check(!exp_valid || cur == exp_cur, $sformatf("t=%0d cur mismatch", t));
      check(held == r_held, $sformatf("t=%0d held %0d exp %0d", t, held, r_held));
      @(posedge clk);
      if (r_held) begin
        if (accept) r_held = 0;
      end else if (lv && !accept) begin
        r_held = 1; r_ap = m_ap; n_held++;
      end
      #1;
    end
    check(n_held > 100, "transfers were held");
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
