// tb_pc_multiplier: checks the 32 selected products of pc_multiplier against
// integer arithmetic for random operands, and its 6-clock latency.
`include "tb_check.svh"
module tb_pc_multiplier;
  import pc_pkg::*;
  logic clk = 0;
  logic [LAT_BITS-1:0] z = '0, w = '0, p;
  int checks = 0, failures = 0;
  pc_multiplier dut (.clk, .z, .w, .p);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)

  function automatic logic [LAT_BITS-1:0] ref_p(logic [LAT_BITS-1:0] a, logic [LAT_BITS-1:0] b);
    logic [LAT_BITS-1:0] r;
    for (int k = 0; k < N_LAT; k++) begin
      int prod;
      prod = int'($signed(a[16*k +: 16])) * int'($signed(b[16*k +: 16]));
      r[16*k +: 16] = 16'(prod >>> 12);
    end
    return r;
  endfunction

  logic [LAT_BITS-1:0] exp_q [$];
  initial begin
    // pipeline: apply a new operand set every clock, compare 6 clocks later
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int k = 0; k < LAT_BITS/32; k++) begin z[32*k +: 32] = $urandom; w[32*k +: 32] = $urandom; end
      if (n == 0) begin z = '0; z[15:0] = 16'h7FFF; w = '0; w[15:0] = 16'h8000; end
      exp_q.push_back(ref_p(z, w));
      if (n >= 6) begin
        `TB_CHECK(p == exp_q[0], $sformatf("products, set %0d", n-6))
        void'(exp_q.pop_front());
      end
    end
    `TB_FINISH
  end
endmodule
