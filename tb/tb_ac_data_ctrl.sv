// tb_ac_data_ctrl: stores random 32x32 arrays in ac_data_ctrl and checks
// the formed 16,384-bit array two clocks after `store`, `end_sig` one clock
// later (the store/forming/end steps, one clock each), and the 512 words
// written to the FIFO under random back-pressure.
`include "tb_check.svh"
module tb_ac_data_ctrl;
  import ac_pkg::*;
  logic clk = 0, rst_n = 0, store = 0, fifo_full = 0;
  fix_t img [OUT_DIM][OUT_DIM];
  logic [IMG_BITS-1:0] img_bits;
  logic end_sig, fifo_wr, busy;
  logic [31:0] fifo_data;
  int checks = 0, failures = 0;
  ac_data_ctrl dut (.clk, .rst_n, .store, .img, .img_bits, .end_sig, .fifo_wr,
                    .fifo_data, .fifo_full, .busy);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)

  logic [IMG_BITS-1:0] exp_bits;
  int words;
  logic word_ok;
  always @(posedge clk) begin
    if (fifo_wr) begin
      if (fifo_data != exp_bits[32*words +: 32]) word_ok <= 0;
      words <= words + 1;
    end
  end

  initial begin
    for (int r = 0; r < OUT_DIM; r++) for (int c = 0; c < OUT_DIM; c++) img[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      for (int r = 0; r < OUT_DIM; r++)
        for (int c = 0; c < OUT_DIM; c++) begin
          img[r][c] = fix_t'($urandom);
          exp_bits[DW*(OUT_DIM*r + c) +: DW] = img[r][c];
        end
      words = 0; word_ok = 1;
      @(negedge clk); store = 1;
      @(negedge clk); store = 0;
      // the source may change once stored
      for (int r = 0; r < OUT_DIM; r++) for (int c = 0; c < OUT_DIM; c++) img[r][c] = '0;
      `TB_CHECK(!end_sig, "no end signal during forming")
      @(negedge clk);
      `TB_CHECK(img_bits == exp_bits, "formed array two clocks after store")
      `TB_CHECK(end_sig, "end signal three clocks after store")
      @(negedge clk);
      `TB_CHECK(!end_sig, "end signal is one clock")
      while (busy) begin
        fifo_full = (run == 1) ? ($urandom_range(3) == 0) : 1'b0;
        @(negedge clk);
      end
      fifo_full = 0;
      `TB_CHECK(words == IMG_BITS / 32, $sformatf("512 words written, got %0d", words))
      `TB_CHECK(word_ok, "word contents and order")
    end
    `TB_FINISH
  end
endmodule
