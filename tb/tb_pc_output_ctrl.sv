// tb_pc_output_ctrl: loads a random 24,576-bit word and checks that the 768
// 32-bit words leave in order, lowest first, pausing while the FIFO reports
// full, followed by one done pulse.
`include "tb_check.svh"
module tb_pc_output_ctrl;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, fifo_wr, fifo_full = 0, busy, done;
  logic [PART_BITS-1:0] data;
  logic [31:0] fifo_data;
  int checks = 0, failures = 0, idx = 0, n_done = 0, wr_when_full = 0;
  pc_output_ctrl dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 10000)
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr) begin
      if (fifo_data != data[32*idx +: 32]) begin failures++; $display("FAIL: word %0d", idx); end
      checks++; idx++;
    end
    if (done) n_done++;
  end
  always @(negedge clk) fifo_full = ($urandom_range(0, 4) == 0);
  initial begin
    for (int i = 0; i < PART_BITS/32; i++) data[32*i +: 32] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    `TB_CHECK(idx == 768, $sformatf("768 words written, got %0d", idx))
    `TB_CHECK(n_done == 1, "one done pulse")
    `TB_CHECK(wr_when_full == 0, "no write while full")
    `TB_FINISH
  end
  always @(posedge clk) if (fifo_wr && fifo_full) wr_when_full++;
endmodule
