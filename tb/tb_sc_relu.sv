// tb_sc_relu: checks the enable/done handshake of the sequential ReLU and
// its result for random positive, negative and zero inputs: done exactly
// one clock after each enable, output held while disabled.
`include "tb_check.svh"
module tb_sc_relu;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, done;
  q_t x = '0, y;
  int checks = 0, failures = 0;
  sc_relu dut (.clk, .rst_n, .en, .x, .y, .done);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 10000)

  initial begin
    q_t last;
    logic en_prev;
    last = '0; en_prev = 0;
    repeat (2) @(negedge clk);
    `TB_CHECK(!done && y == '0, "reset state")
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      en = ($urandom_range(2) != 0);
      x = (n % 50 == 0) ? '0 : q_t'($urandom);
      @(negedge clk);
      `TB_CHECK(done == en, $sformatf("done follows enable by one clock (%0d)", n))
      if (en) last = (x < 0) ? '0 : x;
      `TB_CHECK(y == last, $sformatf("ReLU value %0d", n))
    end
    `TB_FINISH
  end
endmodule
