// tb_ac_top: full angle completion decoder. For several latent pairs
// (random, zero, and the mean of two random pairs as in viewpoint
// interpolation) it pulses `start`, checks that `end_sig` comes exactly 264
// clocks after it (counting the start clock and the end clock), that the
// 16,384-bit image equals the reference model, and that the 512 words read
// from the output FIFO carry the same image. A `start` while busy must be
// ignored.
`include "tb_check.svh"
module tb_ac_top;
  import ac_pkg::*;
  import ac_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, rd_en = 0;
  logic [31:0] z = '0;
  logic busy, end_sig, rd_empty;
  logic [IMG_BITS-1:0] img_bits;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  ac_top dut (.clk, .rst_n, .z, .start, .busy, .end_sig, .img_bits, .rd_en, .rd_data, .rd_empty);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)

  task automatic run(input logic [31:0] zz);
    logic [IMG_BITS-1:0] exp_bits;
    int cyc, words;
    logic ok;
    exp_bits = ref_image(zz);
    @(negedge clk); z = zz; start = 1;
    cyc = 1;
    @(negedge clk); start = 0; z = $urandom;
    while (!end_sig) begin
      if (cyc == 100) start = 1;      // ignored while busy
      else start = 0;
      cyc++;
      @(negedge clk);
    end
    start = 0;
    `TB_CHECK(cyc + 1 == 264, $sformatf("start to end signal: %0d clocks (design: 264)", cyc + 1))
    `TB_CHECK(img_bits == exp_bits, $sformatf("image for z=%08h", zz))
    words = 0; ok = 1;
    while (busy || !rd_empty) begin
      rd_en = !rd_empty;
      #1;
      if (rd_en) begin
        if (rd_data != exp_bits[32*words +: 32]) ok = 0;
        words++;
      end
      @(negedge clk);
      rd_en = 0;
    end
    `TB_CHECK(words == IMG_BITS / 32, $sformatf("words read from FIFO: %0d", words))
    `TB_CHECK(ok, "FIFO words equal the image")
  endtask

  initial begin
    logic [31:0] za, zb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run($urandom);
    run('0);
    za = $urandom; zb = $urandom;
    run({16'((int'($signed(za[31:16])) + int'($signed(zb[31:16]))) >>> 1),
         16'((int'($signed(za[15:0])) + int'($signed(zb[15:0]))) >>> 1)});
    run({16'h0200, 16'hFE00});
    `TB_FINISH
  end
endmodule
