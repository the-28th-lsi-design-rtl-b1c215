// tb_pdense: checks the partitioned dense unit.
//  1. Random operations every clock on the default 16x2 unit, compared
//     with integer arithmetic 3 clocks later (pipelined rate 1/clock).
//  2. The 256x16x256 image-compression VAE layers on the 16x2 unit with
//     the host loop b <- Z: encoder 256 -> 16 means + 16 variances must
//     take 256 runs, decoder 16 -> 256 must take 128 runs.
//  3. The 180 -> 40 hand-gesture encoder layer on a 9x2 unit (Algorithm 1
//     sizes), 400 runs; ReLU output of the last run checked.
// Weights and inputs are random Q7.8 values of small magnitude.
`include "tb_check.svh"
module tb_pdense;
  localparam int DW = 16, FRAC = 8;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 100000)

  // default unit: 16 x 2
  logic va = 0, va_o;
  logic signed [DW-1:0] xa [16], wa [32], ba [2], za [2], ya [2];
  pdense dut_a (.clk, .rst_n, .in_valid(va), .x(xa), .w(wa), .b(ba),
                .out_valid(va_o), .z(za), .y(ya));
  // hand-gesture unit: 9 x 2
  logic vb = 0, vb_o;
  logic signed [DW-1:0] xb [9], wb [18], bb [2], zb [2], yb [2];
  pdense #(.N_I(9), .N_O(2)) dut_b (.clk, .rst_n, .in_valid(vb), .x(xb), .w(wb), .b(bb),
                .out_valid(vb_o), .z(zb), .y(yb));

  function automatic int sat(longint s);
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  // one unit operation: x slice (n values), weights of one output, bias
  function automatic int ref_op(int x[], int w[], int bias);
    longint s = 0;
    foreach (x[i]) s += longint'(x[i]) * longint'(w[i]);
    return sat((s >>> FRAC) + bias);
  endfunction

  function automatic int rnd_small();
    return int'($urandom_range(255)) - 128;        // about +-0.5
  endfunction

  int runs_a, runs_b;

  // run a whole layer mi -> mo on unit A (ni=16) or B (ni=9), compare with
  // the same partitioned arithmetic; returns failures of the comparison
  task automatic layer(input bit unit_b, input int mi, input int mo, output int runs);
    int ni, x[], w[][], bias[], zref[], zhw[], yhw[];
    ni = unit_b ? 9 : 16;
    runs = 0;
    x = new[mi]; w = new[mo]; bias = new[mo]; zref = new[mo]; zhw = new[mo]; yhw = new[mo];
    foreach (x[i]) x[i] = rnd_small();
    foreach (w[o]) begin w[o] = new[mi]; foreach (w[o][i]) w[o][i] = rnd_small(); end
    foreach (bias[o]) bias[o] = rnd_small();
    for (int g = 0; g < mo / 2; g++) begin
      int b0, b1;
      b0 = bias[2*g]; b1 = bias[2*g+1];
      for (int j = 0; j < mi / ni; j++) begin
        int xs[], w0[], w1[];
        xs = new[ni]; w0 = new[ni]; w1 = new[ni];
        for (int i = 0; i < ni; i++) begin
          xs[i] = x[j*ni + i]; w0[i] = w[2*g][j*ni + i]; w1[i] = w[2*g+1][j*ni + i];
        end
        @(negedge clk);
        if (unit_b) begin
          for (int i = 0; i < ni; i++) begin xb[i] = DW'(xs[i]); wb[i] = DW'(w0[i]); wb[ni+i] = DW'(w1[i]); end
          bb[0] = DW'(b0); bb[1] = DW'(b1); vb = 1;
          @(negedge clk); vb = 0;
          while (!vb_o) @(negedge clk);
          b0 = int'(zb[0]); b1 = int'(zb[1]);      // b <- Z
          yhw[2*g] = int'(yb[0]); yhw[2*g+1] = int'(yb[1]);
        end else begin
          for (int i = 0; i < ni; i++) begin xa[i] = DW'(xs[i]); wa[i] = DW'(w0[i]); wa[ni+i] = DW'(w1[i]); end
          ba[0] = DW'(b0); ba[1] = DW'(b1); va = 1;
          @(negedge clk); va = 0;
          while (!va_o) @(negedge clk);
          b0 = int'(za[0]); b1 = int'(za[1]);
          yhw[2*g] = int'(ya[0]); yhw[2*g+1] = int'(ya[1]);
        end
        runs++;
      end
      zhw[2*g] = b0; zhw[2*g+1] = b1;
    end
    // reference: same slices and chaining
    for (int o = 0; o < mo; o++) begin
      int acc;
      acc = bias[o];
      for (int j = 0; j < mi / ni; j++) begin
        int xs[], ws[];
        xs = new[ni]; ws = new[ni];
        for (int i = 0; i < ni; i++) begin xs[i] = x[j*ni + i]; ws[i] = w[o][j*ni + i]; end
        acc = ref_op(xs, ws, acc);
      end
      zref[o] = acc;
    end
    begin
      automatic int bad = 0;
      for (int o = 0; o < mo; o++)
        if (zhw[o] != zref[o] || yhw[o] != (zref[o] < 0 ? 0 : zref[o])) bad++;
      `TB_CHECK(bad == 0, $sformatf("layer %0d->%0d: %0d outputs differ", mi, mo, bad))
    end
  endtask

  initial begin
    int exp_z [$][2];
    int n_out;
    foreach (xa[i]) xa[i] = '0;
    foreach (wa[i]) wa[i] = '0;
    foreach (ba[i]) ba[i] = '0;
    foreach (xb[i]) xb[i] = '0;
    foreach (wb[i]) wb[i] = '0;
    foreach (bb[i]) bb[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. pipelined random operations, full-range values (saturation too)
    n_out = 0;
    for (int n = 0; n < 203; n++) begin
      @(negedge clk);
      if (va_o) begin
        if (n_out == 0) `TB_CHECK(n == 3, $sformatf("first result at clock %0d (3 expected)", n))
        `TB_CHECK(za[0] == DW'(exp_z[0][0]) && za[1] == DW'(exp_z[0][1]),
                  $sformatf("pipelined op %0d", n_out))
        `TB_CHECK(ya[0] == (za[0] < 0 ? '0 : za[0]) && ya[1] == (za[1] < 0 ? '0 : za[1]), "ReLU")
        void'(exp_z.pop_front());
        n_out++;
      end
      va = (n < 200);
      if (va) begin
        int xs[], w0[], w1[];
        int e [2];
        xs = new[16]; w0 = new[16]; w1 = new[16];
        for (int i = 0; i < 16; i++) begin
          xs[i] = int'($signed(16'($urandom))); w0[i] = int'($signed(16'($urandom))); w1[i] = int'($signed(16'($urandom)));
          xa[i] = DW'(xs[i]); wa[i] = DW'(w0[i]); wa[16+i] = DW'(w1[i]);
        end
        ba[0] = DW'($urandom); ba[1] = DW'($urandom);
        e[0] = ref_op(xs, w0, int'(ba[0]));
        e[1] = ref_op(xs, w1, int'(ba[1]));
        exp_z.push_back(e);
      end
    end
    va = 0;
    `TB_CHECK(n_out == 200, $sformatf("one result per clock (%0d)", n_out))
    // 2. image-compression VAE on the 16x2 unit
    layer(0, 256, 32, runs_a);
    `TB_CHECK(runs_a == 256, $sformatf("encoder runs %0d (design: 16 x 16 = 256)", runs_a))
    layer(0, 16, 256, runs_a);
    `TB_CHECK(runs_a == 128, $sformatf("decoder runs %0d (design: 128)", runs_a))
    // 3. hand-gesture 180 -> 40 on the 9x2 unit
    layer(1, 180, 40, runs_b);
    `TB_CHECK(runs_b == 400, $sformatf("9x2 runs %0d", runs_b))
    `TB_FINISH
  end
endmodule
