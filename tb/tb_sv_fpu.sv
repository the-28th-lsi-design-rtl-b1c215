// tb_sv_fpu: checks add, multiply and ReLU of the 1/4/11-bit number format
// against a model in real arithmetic (exact result, truncated toward zero,
// saturated at the largest magnitude, flushed to zero below 2^-6), for
// random operands issued one per clock and for edge cases (zero, equal
// and opposite operands, overflow, underflow). Result must follow one
// clock after the operands.
`include "tb_check.svh"
module tb_sv_fpu;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] op = '0;
  logic [15:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;
  int n_sat = 0, n_flush = 0;
  sv_fpu dut (.clk, .rst_n, .in_valid, .op, .a, .b, .out_valid, .y);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 50000)

  function automatic real pow2(int k);
    real r = 1.0;
    for (int i = 0; i < k; i++) r = r * 2.0;
    for (int i = 0; i > k; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real dec(logic [15:0] v);
    real r;
    if (v[14:11] == 0) return 0.0;
    r = (1.0 + real'(v[10:0]) / 2048.0) * (pow2(int'(v[14:11]) - 7));
    return v[15] ? -r : r;
  endfunction

  function automatic logic [15:0] enc(real r);
    logic s;
    real m;
    int e;
    s = r < 0.0;
    m = s ? -r : r;
    if (m == 0.0 || m < pow2(-6)) return '0;
    if (m >= pow2(9)) return {s, 15'h7FFF};
    e = 7 - 6;
    while (m >= pow2(e - 7 + 1)) e++;
    return {s, 4'(e), 11'($floor((m / (pow2(e - 7)) - 1.0) * 2048.0))};
  endfunction

  function automatic logic [15:0] model(logic [1:0] o, logic [15:0] x, logic [15:0] z);
    real r;
    case (o)
      2'd0: r = dec(x) + dec(z);
      2'd1: r = dec(x) * dec(z);
      default: r = dec(x) > 0.0 ? dec(x) : 0.0;
    endcase
    return enc(r);
  endfunction

  function automatic logic [15:0] rnd();
    logic [15:0] v;
    v = 16'($urandom);
    if ($urandom_range(7) == 0) v[14:11] = 4'd0;
    return v;
  endfunction

  logic [15:0] exp_q [$];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3010; n++) begin
      if (n >= 1 && n <= 3000) begin
        `TB_CHECK(out_valid, "out_valid one clock after in_valid")
        `TB_CHECK(y == exp_q[0], $sformatf("op %0d: got %04h expected %04h", n-1, y, exp_q[0]))
        void'(exp_q.pop_front());
      end
      in_valid = (n < 3000);
      op = 2'($urandom_range(2));
      a = rnd(); b = rnd();
      case (n)
        0: begin op = 0; a = 16'h3800; b = 16'hB800; end          // 1 + (-1) = 0
        1: begin op = 1; a = 16'h7FFF; b = 16'h7FFF; end          // overflow
        2: begin op = 1; a = 16'h0800; b = 16'h0800; end          // underflow
        3: begin op = 0; a = 16'h7FFF; b = 16'h7FFF; end          // overflow in add
        4: begin op = 0; a = 16'h0801; b = 16'h8800; end          // cancellation below range
        5: begin op = 2; a = 16'hB800; end                        // ReLU of -1
        6: begin op = 0; a = 16'h7800; b = 16'h0800; end          // far apart exponents
        default: ;
      endcase
      if (in_valid) begin
        automatic logic [15:0] e = model(op, a, b);
        if (e[14:0] == 15'h7FFF && !(op == 2)) n_sat++;
        if (e == '0 && op != 2 && a[14:11] != 0 && b[14:11] != 0) n_flush++;
        exp_q.push_back(e);
      end
      @(negedge clk);
    end
    `TB_CHECK(!out_valid, "idle after last operation")
    `TB_CHECK(n_sat >= 2 && n_flush >= 2, "saturation and flush cases exercised")
    `TB_FINISH
  end
endmodule
