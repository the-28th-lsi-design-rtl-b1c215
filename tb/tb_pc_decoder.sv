// tb_pc_decoder: runs pc_decoder at full size for all four quarters with a
// random latent vector, compares all 1,536 outputs of each quarter with the
// reference model, and checks the 17 + 512 = 529 clock latency from start
// to done. A second latent vector with large values exercises saturation.
`include "tb_check.svh"
module tb_pc_decoder;
  import pc_pkg::*;
  import pc_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [1:0] part = '0;
  logic [LAT_BITS-1:0]  latent = '0;
  logic [PART_BITS-1:0] out_data;
  int checks = 0, failures = 0, n_sat = 0;
  pc_decoder dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)

  task automatic run_part(int q);
    int cyc = 0;
    @(negedge clk);
    part = 2'(q); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    `TB_CHECK(cyc == 529, $sformatf("quarter %0d latency %0d, want 529", q, cyc))
    for (int p = 0; p < PTS_PART; p++)
      for (int c = 0; c < 3; c++) begin
        logic [15:0] e, g;
        e = ref_dim(latent, 3*(PTS_PART*q + p) + c);
        g = out_data[48*p + 16*c +: 16];
        if (e == 16'h7FFF || e == 16'h8000) n_sat++;
        `TB_CHECK(g == e, $sformatf("q%0d point %0d coord %0d: got %h want %h", q, p, c, g, e))
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N_LAT; k++) latent[16*k +: 16] = 16'($signed($urandom_range(0, 16383)) - 8192);
    for (int q = 0; q < N_PARTS; q++) run_part(q);
    for (int k = 0; k < N_LAT; k++) latent[16*k +: 16] = (k % 2) ? 16'h7FFF : 16'h8001;
    run_part(1);
    `TB_CHECK(n_sat > 0, "saturation exercised")
    $display("saturated outputs: %0d", n_sat);
    `TB_FINISH
  end
endmodule
