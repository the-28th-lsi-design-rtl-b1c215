// tb_pc_fsm: plays the input control, decoder and output control with
// random delays and checks that pc_fsm issues one gather, then decoder and
// output runs for parts 0, 1, 2, 3 in order, and raises the end flag only
// after the fourth output run.
`include "tb_check.svh"
module tb_pc_fsm;
  logic clk = 0, rst_n = 0, start = 0;
  logic in_go, in_ready = 0, dec_start, dec_done = 0, out_load, out_done = 0, busy, end_flag;
  logic [1:0] part;
  int checks = 0, failures = 0;
  pc_fsm dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  task automatic wait_for(ref logic sig, input string what);
    int t = 0;
    while (!sig && t < 50) begin @(negedge clk); t++; end
    `TB_CHECK(sig, what)
  endtask
  task automatic pulse(ref logic sig);
    repeat ($urandom_range(1, 6)) @(negedge clk);
    sig = 1; @(negedge clk); sig = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      `TB_CHECK(in_go && busy && !end_flag, "gather started")
      pulse(in_ready);
      for (int q = 0; q < 4; q++) begin
        wait_for(dec_start, $sformatf("decoder start %0d", q));
        `TB_CHECK(part == 2'(q), $sformatf("part %0d", q))
        pulse(dec_done);
        wait_for(out_load, $sformatf("output load %0d", q));
        `TB_CHECK(!end_flag, "no end flag before the last part")
        pulse(out_done);
      end
      @(negedge clk);
      `TB_CHECK(end_flag && !busy, "end flag after four parts")
    end
    `TB_FINISH
  end
endmodule
