// tb_sm_rr_block: exhaustive check of the round-robin block.
//
// For 8 masters, every request vector and every last-selected master is
// applied. The expected winner is the requester at the smallest positive
// cyclic distance from the last one (distance N for the last one itself),
// computed here independently of the block's search loop.
module tb_sm_rr_block;
  localparam int NM = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [NM-1:0] req;
  logic [2:0]    last;
  logic          valid;
  logic [2:0]    idx;

  sm_rr_block #(.NUM_MASTERS(NM)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < (1 << NM); r++) begin
      for (int l = 0; l < NM; l++) begin
        int best_d, exp_idx;
        req  = NM'(r);
        last = 3'(l);
        @(posedge clk);
        best_d = NM + 1; exp_idx = -1;
        for (int m = 0; m < NM; m++) begin
          int d;
          d = (m - l + NM) % NM;
          if (d == 0) d = NM;
          if (req[m] && d < best_d) begin best_d = d; exp_idx = m; end
        end
        checks++;
        if (valid != (r != 0) || (r != 0 && int'(idx) != exp_idx)) begin
          failures++;
          if (failures < 10)
            $display("FAIL req=%b last=%0d got %0d/%0d exp %0d", req, l, valid, idx, exp_idx);
        end
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
