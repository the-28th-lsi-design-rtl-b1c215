// tb_pc_weight_mult: drives random latent vectors and three weight rows into
// pc_weight_mult and checks the three concatenated 21-bit dot products
// (x in bits [20:0], y in [41:21], z in [62:42]) after 6 + 5 clocks.
`include "tb_check.svh"
module tb_pc_weight_mult;
  import pc_pkg::*;
  logic clk = 0;
  logic [LAT_BITS-1:0] z = '0;
  logic [LAT_BITS-1:0] w [3] = '{default: '0};
  logic [3*SUM_W-1:0] sum;
  int checks = 0, failures = 0;
  pc_weight_mult dut (.clk, .z, .w, .sum);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  int eq [$][3];
  initial begin
    for (int n = 0; n < 200; n++) begin
      int e [3];
      @(negedge clk);
      for (int k = 0; k < N_LAT; k++) begin
        z[16*k +: 16] = 16'($urandom);
        for (int l = 0; l < 3; l++) w[l][16*k +: 16] = 16'($urandom);
      end
      for (int l = 0; l < 3; l++) begin
        e[l] = 0;
        for (int k = 0; k < N_LAT; k++) begin
          int pr;
          pr = int'($signed(z[16*k +: 16])) * int'($signed(w[l][16*k +: 16]));
          e[l] += int'($signed(16'(pr >>> 12)));
        end
      end
      eq.push_back(e);
      if (n >= 11) begin
        for (int l = 0; l < 3; l++)
          `TB_CHECK(int'($signed(sum[l*SUM_W +: SUM_W])) == eq[0][l], $sformatf("lane %0d set %0d", l, n-11))
        void'(eq.pop_front());
      end
    end
    `TB_FINISH
  end
endmodule
