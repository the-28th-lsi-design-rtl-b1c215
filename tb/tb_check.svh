// tb_check.svh: counters and a comparison macro shared by the testbenches.
// `TB_CHECK(cond, msg) counts one check and, if cond is false, one failure
// and prints msg. `TB_FINISH prints the result line and ends the run.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define TB_CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
`endif
