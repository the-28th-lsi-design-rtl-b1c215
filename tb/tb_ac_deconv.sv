// tb_ac_deconv: streams 16x16 maps of random cell values through ac_deconv
// (one cell per clock, and a second map with random idle clocks between
// cells) and compares the 32x32 array with the reference scatter; a third
// map of extreme values with an extreme kernel checks saturation, and `clear` must zero the array.
// Also checks the three-clock latency from the last cell to the final value.
`include "tb_check.svh"
module tb_ac_deconv;
  import ac_pkg::*;
  import ac_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, a_valid = 0;
  fix_t a = '0;
  logic [3:0] row = '0, col = '0;
  logic [KS*KS*DW-1:0] kernel = ac_k();
  fix_t img [OUT_DIM][OUT_DIM];
  int checks = 0, failures = 0;
  ac_deconv dut (.clk, .rst_n, .clear, .a_valid, .a, .row, .col, .kernel, .img);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)

  function automatic logic [IMG_BITS-1:0] packed_img();
    logic [IMG_BITS-1:0] bits;
    for (int r = 0; r < OUT_DIM; r++)
      for (int c = 0; c < OUT_DIM; c++) bits[DW*(OUT_DIM*r + c) +: DW] = img[r][c];
    return bits;
  endfunction

  task automatic run_map(input int mode);
    fix_t cells [N_CELLS];
    logic [IMG_BITS-1:0] exp_bits;
    for (int n = 0; n < N_CELLS; n++)
      cells[n] = (mode == 2) ? fix_t'((n % 2) ? 16'h7FFF : 16'h7F00) : fix_t'($urandom);
    // mode 2: extreme cells and an extreme kernel drive products and sums
    // into saturation
    kernel = (mode == 2) ? {KS*KS{16'h7FFF}} : ac_k();
    exp_bits = ref_scatter(cells, kernel);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    `TB_CHECK(packed_img() == '0, "array cleared")
    for (int n = 0; n < N_CELLS; n++) begin
      if (mode == 1) begin
        a_valid = 0;
        repeat ($urandom_range(2)) @(negedge clk);
      end
      a_valid = 1; a = cells[n]; row = 4'(n / IN_DIM); col = 4'(n % IN_DIM);
      @(negedge clk);
    end
    a_valid = 0; a = '0;
    // last cell sampled; its products land after three clocks in total
    @(negedge clk);
    `TB_CHECK(packed_img() != exp_bits, "not final one clock after last cell")
    @(negedge clk);
    `TB_CHECK(packed_img() == exp_bits, $sformatf("image of map mode %0d", mode))
    repeat (3) @(negedge clk);
    `TB_CHECK(packed_img() == exp_bits, "image holds")
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_map(0);
    run_map(1);
    run_map(2);
    `TB_CHECK(img[2][2] == 16'sh7FFF && img[31][31] == 16'sh7FFF, "saturation reached on extreme map")
    run_map(0);
    `TB_FINISH
  end
endmodule
