// vae_contest_top: the VAE hardware blocks of this collection side by side
// on one clock and reset. The designs are independent of each other (each
// served its own processor system), so nothing is connected between them;
// every block keeps its own ports, prefixed by its design:
//   pc_ : point cloud generator decoder (AXI4-Lite slave, 32-d latent ->
//         2,048 points), pc_top
//   ac_ : angle completion decoder (2 latents -> 32x32 image), ac_top
//   pd_ : partitioned dense unit, 16 inputs x 2 outputs, pdense
//   fp_ : 1/4/11-bit arithmetic unit of the stacked VAE classifier, sv_fpu
//   sc_ : ShiftCNN VAE building blocks: two-term shift multiplier,
//         sequential ReLU, exp/sigmoid tables, reparameterisation, and
//         the 169 -> 100 dense layer engine
// Array ports of the blocks are flattened into packed vectors here (element
// i at bits [16i +: 16] or [20i +: 20]). Timing is that of each block.
// A lint note (SYNCASYNCNET) on rst_n comes from the `disable iff` of
// the point cloud assertions; all flip-flops use the asynchronous reset.
module vae_contest_top (
  input  logic           clk,
  input  logic           rst_n,
  // point cloud generator, AXI4-Lite
  input  logic [3:0]     pc_awaddr,
  input  logic           pc_awvalid,
  output logic           pc_awready,
  input  logic [31:0]    pc_wdata,
  input  logic           pc_wvalid,
  output logic           pc_wready,
  output logic [1:0]     pc_bresp,
  output logic           pc_bvalid,
  input  logic           pc_bready,
  input  logic [3:0]     pc_araddr,
  input  logic           pc_arvalid,
  output logic           pc_arready,
  output logic [31:0]    pc_rdata,
  output logic [1:0]     pc_rresp,
  output logic           pc_rvalid,
  input  logic           pc_rready,
  output logic           pc_end_flag,
  // angle completion decoder
  input  logic [31:0]    ac_z,
  input  logic           ac_start,
  output logic           ac_busy,
  output logic           ac_end_sig,
  output logic [16383:0] ac_img_bits,
  input  logic           ac_rd_en,
  output logic [31:0]    ac_rd_data,
  output logic           ac_rd_empty,
  // partitioned dense unit 16 x 2
  input  logic           pd_in_valid,
  input  logic [255:0]   pd_x,
  input  logic [511:0]   pd_w,
  input  logic [31:0]    pd_b,
  output logic           pd_out_valid,
  output logic [31:0]    pd_z,
  output logic [31:0]    pd_y,
  // 1/4/11-bit arithmetic unit
  input  logic           fp_in_valid,
  input  logic [1:0]     fp_op,
  input  logic [15:0]    fp_a,
  input  logic [15:0]    fp_b,
  output logic           fp_out_valid,
  output logic [15:0]    fp_y,
  // ShiftCNN blocks
  input  logic [19:0]    sc_mul_x,
  input  logic [19:0]    sc_mul_w,
  output logic [19:0]    sc_mul_y,
  input  logic           sc_relu_en,
  input  logic [19:0]    sc_relu_x,
  output logic [19:0]    sc_relu_y,
  output logic           sc_relu_done,
  input  logic           sc_lut_sel,
  input  logic [19:0]    sc_lut_x,
  output logic [19:0]    sc_lut_y,
  input  logic           sc_rp_in_valid,
  input  logic [19:0]    sc_rp_mean,
  input  logic [19:0]    sc_rp_logvar,
  input  logic [19:0]    sc_rp_eps,
  output logic           sc_rp_out_valid,
  output logic [19:0]    sc_rp_z,
  input  logic           sc_d_x_we,
  input  logic [7:0]     sc_d_x_addr,
  input  logic [19:0]    sc_d_x_data,
  input  logic           sc_d_w_we,
  input  logic [14:0]    sc_d_w_addr,
  input  logic [19:0]    sc_d_w_data,
  input  logic           sc_d_b_we,
  input  logic [6:0]     sc_d_b_addr,
  input  logic [19:0]    sc_d_b_data,
  input  logic           sc_d_relu_en,
  input  logic           sc_d_start,
  output logic           sc_d_busy,
  output logic           sc_d_done,
  input  logic [6:0]     sc_d_y_addr,
  output logic [19:0]    sc_d_y_data
);
  pc_top u_pc (
    .clk, .rst_n,
    .s_awaddr(pc_awaddr), .s_awvalid(pc_awvalid), .s_awready(pc_awready),
    .s_wdata(pc_wdata), .s_wvalid(pc_wvalid), .s_wready(pc_wready),
    .s_bresp(pc_bresp), .s_bvalid(pc_bvalid), .s_bready(pc_bready),
    .s_araddr(pc_araddr), .s_arvalid(pc_arvalid), .s_arready(pc_arready),
    .s_rdata(pc_rdata), .s_rresp(pc_rresp), .s_rvalid(pc_rvalid), .s_rready(pc_rready),
    .end_flag(pc_end_flag));

  ac_top u_ac (
    .clk, .rst_n, .z(ac_z), .start(ac_start), .busy(ac_busy), .end_sig(ac_end_sig),
    .img_bits(ac_img_bits), .rd_en(ac_rd_en), .rd_data(ac_rd_data), .rd_empty(ac_rd_empty));

  logic signed [15:0] pd_xa [16], pd_wa [32], pd_ba [2], pd_za [2], pd_ya [2];
  always_comb begin
    for (int i = 0; i < 16; i++) pd_xa[i] = pd_x[16*i +: 16];
    for (int i = 0; i < 32; i++) pd_wa[i] = pd_w[16*i +: 16];
    for (int i = 0; i < 2; i++) begin
      pd_ba[i]       = pd_b[16*i +: 16];
      pd_z[16*i +: 16] = pd_za[i];
      pd_y[16*i +: 16] = pd_ya[i];
    end
  end
  pdense u_pd (
    .clk, .rst_n, .in_valid(pd_in_valid), .x(pd_xa), .w(pd_wa), .b(pd_ba),
    .out_valid(pd_out_valid), .z(pd_za), .y(pd_ya));

  sv_fpu u_fp (
    .clk, .rst_n, .in_valid(fp_in_valid), .op(fp_op), .a(fp_a), .b(fp_b),
    .out_valid(fp_out_valid), .y(fp_y));

  sc_shift_mul u_sc_mul (.clk, .x(sc_mul_x), .w(sc_mul_w), .y(sc_mul_y));
  sc_relu u_sc_relu (.clk, .rst_n, .en(sc_relu_en), .x(sc_relu_x), .y(sc_relu_y), .done(sc_relu_done));
  sc_lut u_sc_lut (.clk, .sel(sc_lut_sel), .x(sc_lut_x), .y(sc_lut_y));
  sc_reparam u_sc_rp (
    .clk, .rst_n, .in_valid(sc_rp_in_valid), .mean(sc_rp_mean), .logvar(sc_rp_logvar),
    .eps(sc_rp_eps), .out_valid(sc_rp_out_valid), .z(sc_rp_z));
  sc_dense u_sc_dense (
    .clk, .rst_n, .x_we(sc_d_x_we), .x_addr(sc_d_x_addr), .x_data(sc_d_x_data),
    .w_we(sc_d_w_we), .w_addr(sc_d_w_addr), .w_data(sc_d_w_data),
    .b_we(sc_d_b_we), .b_addr(sc_d_b_addr), .b_data(sc_d_b_data),
    .relu_en(sc_d_relu_en), .start(sc_d_start), .busy(sc_d_busy), .done(sc_d_done),
    .y_addr(sc_d_y_addr), .y_data(sc_d_y_data));
endmodule
