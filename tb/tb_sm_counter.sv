// tb_sm_counter: self-checking testbench of the transfer-length counter.
//
// Random load, decrement and idle cycles are applied; a reference count
// kept here (load wins, decrement stops at zero) is compared with the
// counter after every clock edge, and the reset value is checked.
module tb_sm_counter;
  localparam int W = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         load, dec;
  logic [W-1:0] load_val, count;
  int           ref_count;

  sm_counter #(.WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    load = 0; dec = 0; load_val = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (count != 0) begin failures++; $display("FAIL reset value %0d", count); end
    #1 rst_n = 1;
    ref_count = 0;
    for (int t = 0; t < 2000; t++) begin
      load     = ($urandom_range(0, 9) == 0);
      dec      = ($urandom_range(0, 3) != 0);
      load_val = W'($urandom_range(0, 16));
      @(posedge clk);
      if (load)                    ref_count = load_val;
      else if (dec && ref_count)   ref_count--;
      #1;
      checks++;
      if (int'(count) != ref_count) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d exp %0d", t, count, ref_count);
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
