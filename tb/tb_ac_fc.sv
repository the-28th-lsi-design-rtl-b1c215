// tb_ac_fc: applies a new random (z, w, b) every clock to ac_fc and checks
// A = z1*w11 + z2*w12 + b1 (Q7.8, saturating) two clocks later; includes
// operands that saturate positive and negative.
`include "tb_check.svh"
module tb_ac_fc;
  import ac_pkg::*;
  logic clk = 0;
  logic [31:0] z = '0, w = '0;
  fix_t b = '0, a;
  int checks = 0, failures = 0;
  int n_sat = 0;
  ac_fc dut (.clk, .z, .w, .b, .a);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)

  fix_t exp_q [$];
  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      z = $urandom; w = $urandom; b = fix_t'($urandom);
      if (n == 5) begin z = {16'h7FFF, 16'h7FFF}; w = {16'h7FFF, 16'h7FFF}; b = 16'h7FFF; end
      if (n == 6) begin z = {16'h7FFF, 16'h7FFF}; w = {16'h8000, 16'h8000}; b = 16'h8000; end
      begin
        automatic longint s = longint'(fxmul(fix_t'(z[15:0]), fix_t'(w[15:0])))
                            + longint'(fxmul(fix_t'(z[31:16]), fix_t'(w[31:16]))) + longint'(b);
        if (s > 32767 || s < -32768) n_sat++;
        exp_q.push_back(sat16(s));
      end
      if (n >= 2) begin
        `TB_CHECK(a == exp_q[0], $sformatf("A of set %0d: got %0d expected %0d", n-2, a, exp_q[0]))
        void'(exp_q.pop_front());
      end
    end
    `TB_CHECK(n_sat >= 2, "saturation exercised")
    `TB_FINISH
  end
endmodule
