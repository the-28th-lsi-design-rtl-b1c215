// tb_pc_axil_regs: AXI4-Lite transactions against pc_axil_regs: writes to
// 0x08 reach FIFO A, a write of 1 to 0x00 gives one start pulse, reads of
// 0x00/0x04 return busy and the end flag, reads of 0x0C pop FIFO B in order
// and return 0 when it is empty; responses are OKAY and held until taken.
`include "tb_check.svh"
module tb_pc_axil_regs;
  logic clk = 0, rst_n = 0;
  logic [3:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [1:0] s_bresp, s_rresp;
  logic start, busy = 0, end_flag = 0, fifo_a_wr, fifo_a_full = 0, fifo_b_rd, fifo_b_empty;
  logic [31:0] fifo_a_data, fifo_b_data;
  int checks = 0, failures = 0, n_start = 0;
  logic [31:0] fa [$], fb [$];
  pc_axil_regs dut (.*);
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  logic fb_push = 0, fb_full;
  logic [31:0] fb_push_data = '0;
  logic [3:0]  fb_count;
  pc_fifo #(.WIDTH(32), .DEPTH(8)) u_fifo_b (
    .clk, .rst_n, .wr_en(fb_push), .wr_data(fb_push_data), .rd_en(fifo_b_rd),
    .rd_data(fifo_b_data), .empty(fifo_b_empty), .full(fb_full), .count(fb_count));
  always @(posedge clk) begin
    if (fifo_a_wr) fa.push_back(fifo_a_data);
    if (start) n_start++;
  end
  task automatic axi_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1; #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    repeat (2) @(negedge clk);
    `TB_CHECK(s_bvalid && s_bresp == 2'b00, "write response held")
    s_bready = 1; @(negedge clk); s_bready = 0;
  endtask
  task automatic axi_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); s_araddr = a; s_arvalid = 1; #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_arvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    `TB_CHECK(s_rvalid && s_rresp == 2'b00, "read response")
    d = s_rdata; s_rready = 1; @(negedge clk); s_rready = 0;
  endtask
  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) axi_write(4'h8, 32'hC0DE_0000 + i);
    `TB_CHECK(fa.size() == 16, "16 words in FIFO A")
    for (int i = 0; i < 16 && i < fa.size(); i++) `TB_CHECK(fa[i] == 32'hC0DE_0000 + i, "FIFO A data")
    `TB_CHECK(n_start == 0, "no start from data writes")
    axi_write(4'h0, 32'h1);
    `TB_CHECK(n_start == 1, "one start pulse")
    axi_write(4'h0, 32'h0);
    `TB_CHECK(n_start == 1, "writing 0 does not start")
    busy = 1; axi_read(4'h0, d); `TB_CHECK(d == 1, "busy read")
    busy = 0; end_flag = 0; axi_read(4'h4, d); `TB_CHECK(d == 0, "end flag low")
    end_flag = 1; axi_read(4'h4, d); `TB_CHECK(d == 1, "end flag high")
    for (int i = 0; i < 5; i++) begin
      fb.push_back($urandom);
      @(negedge clk); fb_push = 1; fb_push_data = fb[i]; @(negedge clk); fb_push = 0;
    end
    for (int i = 0; i < 5; i++) begin
      automatic logic [31:0] e = fb[i];
      axi_read(4'hC, d); `TB_CHECK(d == e, $sformatf("FIFO B word %0d", i))
    end
    axi_read(4'hC, d); `TB_CHECK(d == 0, "empty FIFO B reads 0")
    `TB_FINISH
  end
endmodule
