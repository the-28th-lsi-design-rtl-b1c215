// tb_vae_contest_top: end-to-end run of every block in vae_contest_top at
// its default (full) size, all on the same clock, and a count of the
// mechanisms each design relies on:
//  - point cloud: 16 latent words through FIFO A, start, four quarters of
//    512 points (529 clocks each), 3,072 words out of FIFO B, end flag;
//    all 6,144 coordinates compared with the reference model
//  - angle completion: 256 cells, overlapping scatter-add, end signal
//    after 264 clocks, 512 FIFO words; image compared with the reference
//  - partitioned dense unit: a 256 -> 2 slice chain (16 runs, b <- Z)
//  - 1/4/11-bit unit: add, multiply, ReLU
//  - ShiftCNN: shift multiply, ReLU handshake, exp and sigmoid tables,
//    reparameterisation, and a full 169 -> 100 dense layer
// Each count is checked against the number the design implies.
`include "tb_check.svh"
module tb_vae_contest_top;
  import pc_pkg::*;
  import pc_ref_pkg::*;
  import ac_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  // point cloud AXI
  logic [3:0]  pc_awaddr = 0, pc_araddr = 0;
  logic        pc_awvalid = 0, pc_wvalid = 0, pc_bready = 1, pc_arvalid = 0, pc_rready = 1;
  logic        pc_awready, pc_wready, pc_bvalid, pc_arready, pc_rvalid, pc_end_flag;
  logic [31:0] pc_wdata = 0, pc_rdata;
  logic [1:0]  pc_bresp, pc_rresp;
  // angle completion
  logic [31:0] ac_z = 0, ac_rd_data;
  logic        ac_start = 0, ac_rd_en = 0, ac_busy, ac_end_sig, ac_rd_empty;
  logic [16383:0] ac_img_bits;
  // dense unit
  logic        pd_in_valid = 0, pd_out_valid;
  logic [255:0] pd_x = 0;
  logic [511:0] pd_w = 0;
  logic [31:0] pd_b = 0, pd_z, pd_y;
  // float unit
  logic        fp_in_valid = 0, fp_out_valid;
  logic [1:0]  fp_op = 0;
  logic [15:0] fp_a = 0, fp_b = 0, fp_y;
  // ShiftCNN
  logic [19:0] sc_mul_x = 0, sc_mul_w = 0, sc_mul_y;
  logic        sc_relu_en = 0, sc_relu_done;
  logic [19:0] sc_relu_x = 0, sc_relu_y;
  logic        sc_lut_sel = 0;
  logic [19:0] sc_lut_x = 0, sc_lut_y;
  logic        sc_rp_in_valid = 0, sc_rp_out_valid;
  logic [19:0] sc_rp_mean = 0, sc_rp_logvar = 0, sc_rp_eps = 0, sc_rp_z;
  logic        sc_d_x_we = 0, sc_d_w_we = 0, sc_d_b_we = 0, sc_d_relu_en = 0, sc_d_start = 0;
  logic        sc_d_busy, sc_d_done;
  logic [7:0]  sc_d_x_addr = 0;
  logic [14:0] sc_d_w_addr = 0;
  logic [6:0]  sc_d_b_addr = 0, sc_d_y_addr = 0;
  logic [19:0] sc_d_x_data = 0, sc_d_w_data = 0, sc_d_b_data = 0, sc_d_y_data;

  vae_contest_top dut (.*);

  // ---- mechanism counters (observed at the block boundaries, after reset) -
  int n_quarters = 0, n_fa_words = 0, n_fb_words = 0, n_ac_cells = 0, n_ac_words = 0;
  int n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_pc.u_dec.done) n_quarters++;
    if (dut.u_pc.fa_wr) n_fa_words++;
    if (dut.u_pc.fb_wr) n_fb_words++;
    if (dut.u_ac.vld[2]) n_ac_cells++;
    if (dut.u_ac.vld[2] && dut.u_ac.idx[2][3:0] != 0) n_overlap++;
    if (ac_rd_en && !ac_rd_empty) n_ac_words++;
  end

  task automatic axi_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); pc_awaddr = a; pc_awvalid = 1; pc_wdata = d; pc_wvalid = 1; #1;
    while (!(pc_awready && pc_wready)) begin @(negedge clk); #1; end
    @(negedge clk); pc_awvalid = 0; pc_wvalid = 0;
  endtask
  task automatic axi_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); pc_araddr = a; pc_arvalid = 1; #1;
    while (!pc_arready) begin @(negedge clk); #1; end
    @(negedge clk); pc_arvalid = 0;
    while (!pc_rvalid) @(negedge clk);
    d = pc_rdata;
  endtask

  // ---- point cloud: full run ---------------------------------------------
  task automatic run_pc();
    logic [LAT_BITS-1:0] z;
    logic [31:0] d;
    int cyc, bad;
    cyc = 0; bad = 0;
    for (int k = 0; k < N_LAT; k++) z[16*k +: 16] = 16'($signed($urandom_range(0, 16383)) - 8192);
    for (int i = 0; i < 16; i++) axi_write(4'h8, z[32*i +: 32]);
    axi_write(4'h0, 32'h1);
    while (!pc_end_flag) begin @(negedge clk); cyc++; end
    `TB_CHECK(cyc >= 4*(529+768) && cyc <= 4*(529+768) + 40, $sformatf("point cloud run %0d clocks", cyc))
    for (int j = 0; j < FIFO_B_DEPTH; j++) begin
      axi_read(4'hC, d);
      for (int h = 0; h < 2; h++) if (d[16*h +: 16] != ref_dim(z, 2*j + h)) bad++;
    end
    `TB_CHECK(bad == 0, $sformatf("point cloud: %0d of 6144 coordinates wrong", bad))
  endtask

  // ---- angle completion ------------------------------------------------
  task automatic run_ac();
    logic [16383:0] e;
    int cyc, words;
    logic ok;
    e = ref_image(32'h0180_FE40);
    @(negedge clk); ac_z = 32'h0180_FE40; ac_start = 1; cyc = 1;
    @(negedge clk); ac_start = 0;
    while (!ac_end_sig) begin cyc++; @(negedge clk); end
    `TB_CHECK(cyc + 1 == 264, $sformatf("angle completion %0d clocks (264)", cyc + 1))
    `TB_CHECK(ac_img_bits == e, "angle completion image")
    words = 0; ok = 1;
    while (ac_busy || !ac_rd_empty) begin
      ac_rd_en = !ac_rd_empty; #1;
      if (ac_rd_en) begin if (ac_rd_data != e[32*words +: 32]) ok = 0; words++; end
      @(negedge clk); ac_rd_en = 0;
    end
    `TB_CHECK(ok && words == 512, "angle completion FIFO words")
  endtask

  // ---- dense unit: one output pair of a 256-input layer -----------------
  int n_pd_runs = 0;
  task automatic run_pd();
    int x[256], w[2][256], acc[2];
    for (int i = 0; i < 256; i++) begin
      x[i] = int'($urandom_range(255)) - 128;
      w[0][i] = int'($urandom_range(255)) - 128; w[1][i] = int'($urandom_range(255)) - 128;
    end
    acc[0] = 100; acc[1] = -100;
    pd_b = {16'(acc[1]), 16'(acc[0])};
    for (int j = 0; j < 16; j++) begin
      for (int i = 0; i < 16; i++) begin
        pd_x[16*i +: 16] = 16'(x[16*j + i]);
        pd_w[16*i +: 16] = 16'(w[0][16*j + i]);
        pd_w[16*(16+i) +: 16] = 16'(w[1][16*j + i]);
      end
      for (int o = 0; o < 2; o++) begin
        longint s = 0;
        for (int i = 0; i < 16; i++) s += longint'(x[16*j+i]) * longint'(w[o][16*j+i]);
        s = (s >>> 8) + acc[o];
        acc[o] = (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
      end
      @(negedge clk); pd_in_valid = 1;
      @(negedge clk); pd_in_valid = 0;
      while (!pd_out_valid) @(negedge clk);
      n_pd_runs++;
      pd_b = pd_z;                                   // b <- Z
    end
    `TB_CHECK(pd_z == {16'(acc[1]), 16'(acc[0])}, "dense unit chained result")
    `TB_CHECK(pd_y[15:0] == (acc[0] < 0 ? 16'h0 : 16'(acc[0])), "dense unit ReLU")
  endtask

  // ---- small units ------------------------------------------------------
  int n_fp = 0, n_sc = 0;
  task automatic run_small();
    // 1.5 + 2.0 = 3.5; 1.5 * 2.0 = 3.0; ReLU(-1) = 0
    logic [15:0] fa [3] = '{16'h3C00, 16'h3C00, 16'hB800};
    logic [15:0] fb [3] = '{16'h4000, 16'h4000, 16'h0000};
    logic [15:0] fe [3] = '{16'h4600, 16'h4400, 16'h0000};
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); fp_in_valid = 1; fp_op = 2'(k); fp_a = fa[k]; fp_b = fb[k];
      @(negedge clk); fp_in_valid = 0;
      `TB_CHECK(fp_out_valid && fp_y == fe[k], $sformatf("float op %0d: %04h", k, fp_y))
      n_fp++;
    end
    // shift multiply: 3.0 * (2^1 - 2^-2) = 5.25
    @(negedge clk); sc_mul_x = 20'(3 * 1024); sc_mul_w = {10'b1_1_00000010, 10'b0_0_00000001};
    @(negedge clk); `TB_CHECK(sc_mul_y == 20'(5376), "shift multiply"); n_sc++;
    // ReLU handshake
    sc_relu_en = 1; sc_relu_x = -20'sd5;
    @(negedge clk); sc_relu_en = 0; `TB_CHECK(sc_relu_done && sc_relu_y == 0, "ReLU"); n_sc++;
    // exp(0) = 1.0 and sigmoid(0) = 0.5
    sc_lut_sel = 0; sc_lut_x = 0;
    @(negedge clk); `TB_CHECK(sc_lut_y == 20'd1024, "exp table"); n_sc++;
    sc_lut_sel = 1;
    @(negedge clk); `TB_CHECK(sc_lut_y == 20'd512, "sigmoid table"); n_sc++;
    // z = 1.0 + exp(0) * 0.5 = 1.5
    sc_rp_in_valid = 1; sc_rp_mean = 20'd1024; sc_rp_logvar = 0; sc_rp_eps = 20'd512;
    @(negedge clk); sc_rp_in_valid = 0;
    repeat (2) @(negedge clk);
    `TB_CHECK(sc_rp_out_valid && sc_rp_z == 20'd1536, "reparameterisation"); n_sc++;
  endtask

  // dense layer 169 -> 100: x[i] = 2i/1024, weight o: 2^-1 + 2^-1 = 1.0 for
  // even o, -(2^-1) - 2^-1 = -1.0 for odd o, bias o/1024, ReLU on
  task automatic run_dense();
    int cyc, sum_x;
    sum_x = 0;
    for (int i = 0; i < 169; i++) begin
      @(negedge clk); sc_d_x_we = 1; sc_d_x_addr = 8'(i); sc_d_x_data = 20'(2 * i); sum_x += 2 * i;
    end
    @(negedge clk); sc_d_x_we = 0;
    for (int k = 0; k < 16900; k++) begin
      sc_d_w_we = 1; sc_d_w_addr = 15'(k);
      sc_d_w_data = ((k / 169) % 2 == 0) ? {10'b0_1_00000001, 10'b0_1_00000001}
                                         : {10'b1_1_00000001, 10'b1_1_00000001};
      @(negedge clk);
    end
    sc_d_w_we = 0;
    for (int o = 0; o < 100; o++) begin
      sc_d_b_we = 1; sc_d_b_addr = 7'(o); sc_d_b_data = 20'(o);
      @(negedge clk);
    end
    sc_d_b_we = 0; sc_d_relu_en = 1; sc_d_start = 1; cyc = 0;
    @(negedge clk); sc_d_start = 0;
    while (!sc_d_done) begin cyc++; @(negedge clk); end
    `TB_CHECK(cyc == 100 * (169 + 3), $sformatf("dense layer %0d clocks", cyc))
    sc_d_y_addr = 0;  @(negedge clk);
    `TB_CHECK(sc_d_y_data == 20'(sum_x), "dense output 0 (sum of inputs)")
    sc_d_y_addr = 98; @(negedge clk);
    `TB_CHECK(sc_d_y_data == 20'(sum_x + 98), "dense output 98")
    sc_d_y_addr = 99; @(negedge clk);
    `TB_CHECK(sc_d_y_data == 20'd0, "dense output 99 (negative, ReLU)")
    n_sc++;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // the independent designs run at the same time
    fork
      run_pc();
      begin run_ac(); run_pd(); run_small(); run_dense(); end
    join
    `TB_CHECK(n_fa_words == 16, $sformatf("FIFO A words %0d", n_fa_words))
    `TB_CHECK(n_quarters == 4, $sformatf("quarters decoded %0d", n_quarters))
    `TB_CHECK(n_fb_words == 3072, $sformatf("FIFO B words %0d", n_fb_words))
    `TB_CHECK(n_ac_cells == 256, $sformatf("angle completion cells %0d", n_ac_cells))
    `TB_CHECK(n_overlap == 240, $sformatf("cells overlapping their left neighbour %0d", n_overlap))
    `TB_CHECK(n_ac_words == 512, $sformatf("angle completion words %0d", n_ac_words))
    `TB_CHECK(n_pd_runs == 16, $sformatf("dense unit runs %0d", n_pd_runs))
    `TB_CHECK(n_fp == 3 && n_sc == 6, "small unit operations")
    $display("mechanisms: quarters=%0d fifoA=%0d fifoB=%0d cells=%0d overlaps=%0d acwords=%0d pdruns=%0d fp=%0d sc=%0d",
             n_quarters, n_fa_words, n_fb_words, n_ac_cells, n_overlap, n_ac_words, n_pd_runs, n_fp, n_sc);
    `TB_FINISH
  end
endmodule
