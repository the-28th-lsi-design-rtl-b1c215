// tb_sc_dense: full-size 169 -> 100 dense layer on sc_dense. Loads random
// inputs, two-term shift weights and biases through the memory ports, runs
// the layer with and without ReLU, checks all 100 outputs against integer
// arithmetic (each product saturated to Q10.10, sum saturated after the
// bias) and the run length of N_OUT * (N_IN + 3) clocks; a start
// while busy must be ignored.
`include "tb_check.svh"
module tb_sc_dense;
  import sc_pkg::*;
  localparam int N_IN = 169, N_OUT = 100;
  logic clk = 0, rst_n = 0;
  logic x_we = 0, w_we = 0, b_we = 0, relu_en = 0, start = 0, busy, done;
  logic [7:0] x_addr = 0;
  logic [14:0] w_addr = 0;
  logic [6:0] b_addr = 0, y_addr = 0;
  q_t x_data = 0, b_data = 0, y_data;
  logic [19:0] w_data = 0;
  int checks = 0, failures = 0;
  sc_dense dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 100000)

  function automatic longint term(longint xv, logic [9:0] t);
    longint v;
    int sh;
    sh = int'(t[7:0]);
    if (t[8]) v = xv >>> sh;
    else      v = xv * (longint'(1) << sh);
    return t[9] ? -v : v;
  endfunction
  function automatic longint sat(longint s);
    return (s > 524287) ? 524287 : (s < -524288) ? -524288 : s;
  endfunction

  int xs [N_IN], bs [N_OUT];
  logic [19:0] ws [N_OUT*N_IN];

  task automatic run(input logic relu);
    int cyc, bad;
    @(negedge clk); relu_en = relu; start = 1; cyc = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      start = (cyc == 50);                   // ignored while busy
      cyc++;
      @(negedge clk);
    end
    start = 0;
    // cyc - 1 = clock edges from the one sampling start to the one raising done
    `TB_CHECK(cyc - 1 == N_OUT * (N_IN + 3), $sformatf("run length %0d clocks", cyc - 1))
    bad = 0;
    for (int o = 0; o < N_OUT; o++) begin
      longint s = 0;
      for (int i = 0; i < N_IN; i++)
        s += sat(term(xs[i], ws[o*N_IN+i][9:0]) + term(xs[i], ws[o*N_IN+i][19:10]));
      s = sat(s + bs[o]);
      if (relu && s < 0) s = 0;
      y_addr = 7'(o);
      @(negedge clk);
      if (longint'(y_data) != s) begin
        bad++;
        if (bad < 5) $display("FAIL: output %0d got %0d expected %0d", o, y_data, s);
      end
    end
    `TB_CHECK(bad == 0, $sformatf("%0d of 100 outputs wrong (relu=%0d)", bad, relu))
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N_IN; i++) begin
      xs[i] = int'($urandom_range(4095)) - 2048;     // -2 .. +2
      @(negedge clk); x_we = 1; x_addr = 8'(i); x_data = q_t'(xs[i]);
    end
    for (int k = 0; k < N_OUT*N_IN; k++) begin
      // terms: shift right 1..8 with random sign and a smaller second term
      ws[k] = {1'($urandom), 1'b1, 8'($urandom_range(3, 10)), 1'($urandom), 1'b1, 8'($urandom_range(1, 8))};
      @(negedge clk); x_we = 0; w_we = 1; w_addr = 15'(k); w_data = ws[k];
    end
    for (int o = 0; o < N_OUT; o++) begin
      bs[o] = int'($urandom_range(2047)) - 1024;
      @(negedge clk); w_we = 0; b_we = 1; b_addr = 7'(o); b_data = q_t'(bs[o]);
    end
    @(negedge clk); b_we = 0;
    run(1'b0);
    run(1'b1);
    `TB_FINISH
  end
endmodule
