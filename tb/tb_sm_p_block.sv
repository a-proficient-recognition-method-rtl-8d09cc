// tb_sm_p_block: random check of the priority block.
//
// Random request vectors and priority levels for 8 masters. With levels
// in use the expected winner maximises level*8 + (7 - number), i.e. the
// highest level and, among equals, the lowest number; with levels off it
// is the lowest requesting number (fixed priority).
module tb_sm_p_block;
  import ahb_pkg::*;
  localparam int NM = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [NM-1:0]               req;
  logic [NM-1:0][PLEVEL_W-1:0] level;
  logic                        use_level;
  logic                        valid;
  logic [2:0]                  idx;

  sm_p_block #(.NUM_MASTERS(NM)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best, exp_idx, key;
      req       = NM'($urandom);
      if (t % 5 == 0) req = '0;
      use_level = $urandom_range(0, 1);
      for (int m = 0; m < NM; m++) level[m] = 3'($urandom_range(0, 7));
      if (t % 3 == 0) for (int m = 0; m < NM; m++) level[m] = 3'($urandom_range(0, 1));
      @(posedge clk);
      best = -1; exp_idx = -1;
      for (int m = 0; m < NM; m++) begin
        key = (use_level ? int'(level[m]) * 8 : 0) + (7 - m);
        if (req[m] && key > best) begin best = key; exp_idx = m; end
      end
      checks++;
      if (valid != (req != 0) || (req != 0 && int'(idx) != exp_idx)) begin
        failures++;
        if (failures < 10)
          $display("FAIL req=%b use=%0d got %0d exp %0d", req, use_level, idx, exp_idx);
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
