// ahb_sram_model: behavioural AHB-Lite SRAM slave for testbenches.
//
// A word-addressed memory of DEPTH 32-bit words behind an AHB-Lite slave
// interface. A transfer is captured in its address phase (HSEL high,
// HTRANS NONSEQ or SEQ, HREADYOUT high) and completed in its data phase
// after 0..max_wait wait states, drawn at random per transfer. Writes
// take HWDATA at the end of the data phase; reads return the addressed
// word during it. The response is always OKAY. It also checks that the
// address phase stays put while it inserts wait states and counts
// transfers and wait states. Not synthesizable intent: a test model.
module ahb_sram_model #(
  parameter int DEPTH = 1024
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic [3:0]  max_wait,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic        hreadyout,
  output logic [1:0]  hresp,
  output logic [31:0] hrdata
);
  logic [31:0] mem [DEPTH];
  logic        dp_valid;
  logic        dp_write;
  int          dp_word;
  int          wait_left;
  int          n_transfers = 0;
  int          n_waits = 0;
  int          n_errors = 0;
  logic [31:0] stall_addr;
  logic [1:0]  stall_trans;
  logic        st_valid = 1'b0;

  assign hreadyout = !(dp_valid && wait_left > 0);
  assign hresp     = 2'b00;
  assign hrdata    = (dp_valid && !dp_write) ? mem[dp_word] : 32'h0;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = 32'h0;

  always @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_valid  <= 1'b0;
      dp_write  <= 1'b0;
      dp_word   <= 0;
      wait_left <= 0;
      st_valid  <= 1'b0;
    end else if (!hreadyout) begin
      wait_left <= wait_left - 1;
      n_waits++;
      // A pending address phase must not change during wait states.
      if (st_valid && (haddr != stall_addr || htrans != stall_trans)) n_errors++;
      st_valid    <= hsel && htrans[1];
      stall_addr  <= haddr;
      stall_trans <= htrans;
    end else begin
      if (st_valid && (haddr != stall_addr || htrans != stall_trans)) n_errors++;
      st_valid <= 1'b0;
      if (dp_valid && dp_write) mem[dp_word] <= hwdata;
      dp_valid  <= hsel && htrans[1];
      dp_write  <= hwrite;
      dp_word   <= int'(haddr[31:2]) % DEPTH;
      wait_left <= (max_wait == 0) ? 0 : int'($urandom_range(0, int'(max_wait)));
      if (hsel && htrans[1]) n_transfers++;
    end
  end

endmodule
