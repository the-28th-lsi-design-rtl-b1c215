// tb_sc_reparam: checks z = mean + exp(logvar/2) * eps (exp from the
// table, Q10.10 product and saturating sum) for random values issued one
// per clock, and the three-clock latency.
`include "tb_check.svh"
module tb_sc_reparam;
  import sc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  q_t mean = '0, logvar = '0, eps = '0, z;
  int checks = 0, failures = 0;
  sc_reparam dut (.clk, .rst_n, .in_valid, .mean, .logvar, .eps, .out_valid, .z);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)

  function automatic longint texp(q_t xv);
    int q;
    real r;
    q = int'($floor(real'(xv) / 64.0));
    if (q < -128) q = -128;
    if (q > 127) q = 127;
    r = $exp(real'(q) / 16.0) * 1024.0;
    return (r >= 524287.0) ? 524287 : longint'($rtoi(r));
  endfunction

  longint exp_q [$];
  initial begin
    int n_out;
    n_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1003; n++) begin
      if (out_valid) begin
        if (n_out == 0) `TB_CHECK(n == 3, $sformatf("first result after %0d clocks (3)", n))
        `TB_CHECK(longint'(z) - exp_q[0] >= -1 && longint'(z) - exp_q[0] <= 1,
                  $sformatf("z %0d: got %0d expected %0d", n_out, z, exp_q[0]))
        void'(exp_q.pop_front());
        n_out++;
      end
      in_valid = (n < 1000);
      mean = q_t'($signed(20'($urandom)) >>> 6);
      logvar = q_t'(int'($urandom_range(8191)) - 4096);      // -4 .. +4
      eps = q_t'(int'($urandom_range(6143)) - 3072);         // -3 .. +3
      if (in_valid) begin
        automatic longint sd = texp(q_t'(logvar >>> 1));
        automatic longint s = longint'(mean) + ((sd * longint'(eps)) >>> 10);
        exp_q.push_back(s > 524287 ? 524287 : s < -524288 ? -524288 : s);
      end
      @(negedge clk);
    end
    `TB_CHECK(n_out == 1000, $sformatf("results %0d", n_out))
    `TB_FINISH
  end
endmodule
