// tb_pc_top: end-to-end run of the point cloud generator at full size, as
// the processor drives it: 16 AXI4-Lite writes of the latent vector, start,
// polling of the end flag, then 3,072 reads of FIFO B. All 6,144 output
// coordinates are compared with the reference model; the clocks from start
// to end flag are checked against 4 x (529 + 768) plus the gather.
`include "tb_check.svh"
module tb_pc_top;
  import pc_pkg::*;
  import pc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 1, s_arvalid = 0, s_rready = 1;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid, end_flag;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [1:0] s_bresp, s_rresp;
  int checks = 0, failures = 0;
  logic [LAT_BITS-1:0] z;
  pc_top dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 100000)
  task automatic axi_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1; #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
  endtask
  task automatic axi_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); s_araddr = a; s_arvalid = 1; #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask
  initial begin
    logic [31:0] d;
    int cyc = 0, bad = 0, n_reads = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < N_LAT; k++) z[16*k +: 16] = 16'($signed($urandom_range(0, 16383)) - 8192);
    for (int i = 0; i < 16; i++) axi_write(4'h8, z[32*i +: 32]);
    axi_write(4'h0, 32'h1);
    while (!end_flag) begin @(negedge clk); cyc++; end
    $display("start to end flag: %0d clocks", cyc);
    `TB_CHECK(cyc >= 4*(529+768) && cyc <= 4*(529+768) + 40, $sformatf("run length %0d", cyc))
    axi_read(4'h4, d); `TB_CHECK(d == 1, "end flag register")
    for (int j = 0; j < FIFO_B_DEPTH; j++) begin
      axi_read(4'hC, d); n_reads++;
      for (int h = 0; h < 2; h++) begin
        automatic logic [15:0] e = ref_dim(z, 2*j + h);
        if (d[16*h +: 16] != e) begin
          bad++;
          if (bad < 10) $display("FAIL: dim %0d got %h want %h", 2*j + h, d[16*h +: 16], e);
        end
      end
    end
    `TB_CHECK(bad == 0, $sformatf("%0d of 6144 coordinates wrong", bad))
    `TB_CHECK(n_reads == 3072, "3072 words read")
    axi_read(4'hC, d); `TB_CHECK(d == 0, "FIFO B empty afterwards")
    `TB_FINISH
  end
endmodule
