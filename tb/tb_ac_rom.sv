// tb_ac_rom: reads every address of ac_rom in random order and checks the
// weight word, the bias and the kernel against the package formulas, with
// the one-clock read latency.
`include "tb_check.svh"
module tb_ac_rom;
  import ac_pkg::*;
  logic clk = 0;
  logic [7:0] addr = '0;
  logic [31:0] w;
  fix_t b;
  logic [KS*KS*DW-1:0] kernel;
  int checks = 0, failures = 0;
  ac_rom dut (.clk, .addr, .w, .b, .kernel);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)

  initial begin
    int prev;
    prev = -1;
    for (int n = 0; n < 2 * N_CELLS + 1; n++) begin
      @(negedge clk);
      if (prev >= 0) begin
        `TB_CHECK(w == ac_w(prev), $sformatf("weight word addr %0d", prev))
        `TB_CHECK(b == ac_b(prev), $sformatf("bias addr %0d", prev))
      end
      prev = (n < N_CELLS) ? n : int'($urandom_range(N_CELLS - 1));
      addr = 8'(prev);
    end
    `TB_CHECK(kernel == ac_k(), "kernel")
    `TB_FINISH
  end
endmodule
