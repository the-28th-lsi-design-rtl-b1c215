// tb_sc_shift_mul: checks the two-term shift multiplier against integer
// arithmetic (x * (+-2^a1 +-2^a2) with arithmetic right shifts and
// saturation) for random values and terms every clock, including shift
// amounts beyond the data width; result one clock later.
`include "tb_check.svh"
module tb_sc_shift_mul;
  import sc_pkg::*;
  logic clk = 0;
  q_t x = '0, y;
  logic [2*TW-1:0] w = '0;
  int checks = 0, failures = 0;
  int n_sat = 0, n_right = 0, n_left = 0, n_neg = 0;
  sc_shift_mul dut (.clk, .x, .w, .y);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 10000)

  function automatic longint term(longint xv, logic [9:0] t);
    longint v;
    int sh;
    sh = int'(t[7:0]);
    if (t[8]) v = (sh >= 20) ? (xv < 0 ? -1 : 0) : (xv >>> sh);
    else      v = (sh >= 20) ? (xv == 0 ? 0 : (xv < 0 ? -1048576 : 1048574)) : (xv * (longint'(1) << sh));
    return t[9] ? -v : v;
  endfunction

  q_t exp_q [$];
  initial begin
    for (int n = 0; n < 2001; n++) begin
      @(negedge clk);
      if (n > 0) begin
        `TB_CHECK(y == exp_q[0], $sformatf("product %0d: got %0d expected %0d", n-1, y, exp_q[0]))
        void'(exp_q.pop_front());
      end
      x = q_t'($urandom);
      if (n % 3 == 0) x = q_t'($signed(x) >>> 8);
      for (int k = 0; k < 2; k++) begin
        automatic logic [9:0] t = 10'($urandom);
        t[7:0] = ($urandom_range(15) == 0) ? 8'($urandom) : 8'($urandom_range(12));
        w[TW*k +: TW] = t;
        if (t[8]) n_right++; else n_left++;
        if (t[9]) n_neg++;
      end
      begin
        automatic longint s = term(longint'(x), w[9:0]) + term(longint'(x), w[19:10]);
        automatic q_t e = (s > 524287) ? QMAX : (s < -524288) ? QMIN : q_t'(s);
        if (s > 524287 || s < -524288) n_sat++;
        exp_q.push_back(e);
      end
    end
    `TB_CHECK(n_sat > 10 && n_right > 100 && n_left > 100 && n_neg > 100, "all term kinds and saturation exercised")
    `TB_FINISH
  end
endmodule
