// tb_sc_lut: checks the exponential and sigmoid tables against $exp at the
// quantised input (1/16 steps over [-8, 8), clamped outside), within one
// least significant bit, for random inputs and the end points; the sigmoid
// output must have its 9 upper bits zero; one-clock latency.
`include "tb_check.svh"
module tb_sc_lut;
  import sc_pkg::*;
  logic clk = 0, sel = 0;
  q_t x = '0, y;
  int checks = 0, failures = 0;
  sc_lut dut (.clk, .sel, .x, .y);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)

  function automatic longint model(logic s, q_t xv);
    real v, r;
    int q;
    q = int'($floor(real'(xv) / 64.0));
    if (q < -128) q = -128;
    if (q > 127) q = 127;
    v = real'(q) / 16.0;
    if (s) return longint'($rtoi(1024.0 / (1.0 + $exp(-v))));
    r = $exp(v) * 1024.0;
    return (r >= 524287.0) ? 524287 : longint'($rtoi(r));
  endfunction

  initial begin
    logic s_prev;
    q_t x_prev;
    s_prev = 0; x_prev = '0;
    for (int n = 0; n < 3002; n++) begin
      @(negedge clk);
      if (n > 0) begin
        automatic longint e = model(s_prev, x_prev);
        automatic longint d = longint'(y) - e;
        `TB_CHECK(d >= -1 && d <= 1, $sformatf("%s(%0d): got %0d expected %0d",
                  s_prev ? "sigmoid" : "exp", x_prev, y, e))
        if (s_prev) `TB_CHECK(y[19:11] == '0, "sigmoid upper 9 bits zero")
      end
      sel = n[0];
      x = q_t'($signed(20'($urandom)) >>> $urandom_range(9));
      if (n == 10) x = QMAX;
      if (n == 11) x = QMIN;
      if (n == 12) x = q_t'(20'sd7168);      // 7.0: exp saturates
      s_prev = sel; x_prev = x;
    end
    `TB_FINISH
  end
endmodule
