// tb_pc_weight_rom: reads random addresses of pc_weight_rom and compares
// the three weight rows and biases with the table formula; checks the
// three-clock read latency.
`include "tb_check.svh"
module tb_pc_weight_rom;
  import pc_pkg::*;
  logic clk = 0;
  logic [10:0] addr = '0;
  logic [LAT_BITS-1:0] w [3];
  fix_t b [3];
  int checks = 0, failures = 0;
  pc_weight_rom dut (.clk, .addr, .w, .b);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  int aq [$];
  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      addr = (n == 0) ? 11'd0 : (n == 1) ? 11'd2047 : 11'($urandom);
      aq.push_back(int'(addr));
      if (n >= 3) begin
        automatic int a = aq.pop_front();
        for (int l = 0; l < 3; l++) begin
          automatic logic ok = 1;
          for (int k = 0; k < N_LAT; k++)
            if (w[l][16*k +: 16] != pc_weight(3*a + l, k)) ok = 0;
          `TB_CHECK(ok, $sformatf("weights addr %0d lane %0d", a, l))
          `TB_CHECK(b[l] == pc_bias(3*a + l), $sformatf("bias addr %0d lane %0d", a, l))
        end
      end
    end
    `TB_FINISH
  end
endmodule
