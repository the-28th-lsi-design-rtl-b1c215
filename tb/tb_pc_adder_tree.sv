// tb_pc_adder_tree: checks the 21-bit sum of 32 signed terms (random and
// all-extreme values, which need the 5 guard bits) and the 5-clock latency.
`include "tb_check.svh"
module tb_pc_adder_tree;
  import pc_pkg::*;
  logic clk = 0;
  logic [LAT_BITS-1:0] terms = '0;
  logic signed [SUM_W-1:0] sum;
  int checks = 0, failures = 0;
  pc_adder_tree dut (.clk, .terms, .sum);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  int exp_q [$];
  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic int s = 0;
      @(negedge clk);
      for (int k = 0; k < N_LAT; k++) begin
        automatic logic [15:0] t;
        t = (n == 0) ? 16'h7FFF : (n == 1) ? 16'h8000 : 16'($urandom);
        terms[16*k +: 16] = t;
        s += int'($signed(t));
      end
      exp_q.push_back(s);
      if (n >= 5) begin
        `TB_CHECK(int'(sum) == exp_q[0], $sformatf("sum %0d: got %0d want %0d", n-5, sum, exp_q[0]))
        void'(exp_q.pop_front());
      end
    end
    `TB_FINISH
  end
endmodule
