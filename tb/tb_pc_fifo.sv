// tb_pc_fifo: self-checking test of pc_fifo (FIFO A size, 32 x 16).
// Fills the FIFO to full, checks that a write when full is dropped, drains
// it checking order, then runs random pushes/pops against a queue model.
`include "tb_check.svh"
module tb_pc_fifo;
  localparam int W = 32, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  pc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `TB_CHECK(empty && !full && count == 0, "empty after reset")
    for (int i = 0; i < D; i++) begin
      wr_en = 1; wr_data = 32'hA000_0000 + i; @(negedge clk);
    end
    wr_en = 0;
    `TB_CHECK(full && count == D, "full after DEPTH writes")
    for (int i = 0; i < D; i++) begin
      `TB_CHECK(rd_data == 32'hA000_0000 + i, $sformatf("order %0d: %h", i, rd_data))
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    `TB_CHECK(empty, "empty after draining")
    for (int n = 0; n < 2000; n++) begin
      wr_en = ($urandom_range(0, 1) == 1) && !full;
      rd_en = ($urandom_range(0, 2) != 0) && !empty;
      wr_data = $urandom;
      if (rd_en) begin
        `TB_CHECK(model.size() > 0 && rd_data == model[0], "random read data")
        void'(model.pop_front());
      end
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      `TB_CHECK(count == model.size(), "random count")
    end
    `TB_FINISH
  end
endmodule
