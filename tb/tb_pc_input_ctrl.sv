// tb_pc_input_ctrl: feeds 16 words through a pc_fifo (with gaps when the
// FIFO is empty) and checks the packed 512-bit latent vector and the
// one-clock ready pulse.
`include "tb_check.svh"
module tb_pc_input_ctrl;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0, go = 0, fifo_rd, fifo_empty, ready;
  logic [31:0] fifo_data;
  logic [LAT_BITS-1:0] latent, expect_v;
  int checks = 0, failures = 0, n_ready = 0;
  logic        push = 0, fifo_full;
  logic [31:0] push_data = '0;
  logic [4:0]  fifo_count;
  pc_input_ctrl dut (.*);
  pc_fifo #(.WIDTH(32), .DEPTH(16)) u_fifo (
    .clk, .rst_n, .wr_en(push), .wr_data(push_data), .rd_en(fifo_rd), .rd_data(fifo_data),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count));
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  always @(posedge clk) if (ready) n_ready++;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk); go = 1; @(negedge clk); go = 0;
      for (int i = 0; i < 16; i++) begin
        automatic logic [31:0] d = $urandom;
        expect_v[32*i +: 32] = d;
        push = 1; push_data = d; @(negedge clk); push = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      repeat (4) @(negedge clk);
      `TB_CHECK(latent == expect_v, $sformatf("latent vector, run %0d", r))
      `TB_CHECK(n_ready == r + 1, "one ready pulse per vector")
      `TB_CHECK(fifo_empty, "exactly 16 words taken")
    end
    push = 1; push_data = 32'h1234_5678; @(negedge clk); push = 0;
    repeat (5) @(negedge clk);
    `TB_CHECK(fifo_count == 1, "no read while idle")
    `TB_FINISH
  end
endmodule
