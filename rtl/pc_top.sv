// pc_top: point cloud generation circuit, the programmable-logic part of a
// VAE point cloud generator.
//
// The processor writes a 32-dimensional latent vector (16 bits per
// dimension, packed two per 32-bit word) into FIFO A through the AXI4-Lite
// registers, starts the computation and waits for the end flag. The
// calculation circuit then gathers the vector (pc_input_ctrl), and for each
// of four quarters runs the decoder (pc_decoder, a 32 -> 6,144 fully
// connected layer, 512 points per quarter, one point per clock) and moves
// the 24,576-bit quarter into FIFO B as 768 words (pc_output_ctrl). The
// processor reads the 3,072 words of FIFO B: word j holds output
// dimensions 2j (low half) and 2j+1 (high half); dimension 3p+c is
// coordinate c (x, y, z) of point p.
//
// Timing: input 16 clocks, each quarter 529 clocks of decoding plus 768
// clocks of output, about 5,200 clocks from start to end flag.
module pc_top
  import pc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       s_awaddr,
  input  logic             s_awvalid,
  output logic             s_awready,
  input  logic [AXI_W-1:0] s_wdata,
  input  logic             s_wvalid,
  output logic             s_wready,
  output logic [1:0]       s_bresp,
  output logic             s_bvalid,
  input  logic             s_bready,
  input  logic [3:0]       s_araddr,
  input  logic             s_arvalid,
  output logic             s_arready,
  output logic [AXI_W-1:0] s_rdata,
  output logic [1:0]       s_rresp,
  output logic             s_rvalid,
  input  logic             s_rready,
  output logic             end_flag
);
  logic start, busy;
  logic fa_wr, fa_rd, fa_empty, fa_full;
  logic [AXI_W-1:0] fa_wdata, fa_rdata;
  logic fb_wr, fb_rd, fb_empty, fb_full;
  logic [AXI_W-1:0] fb_wdata, fb_rdata;

  pc_axil_regs u_regs (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .start, .busy, .end_flag,
    .fifo_a_wr(fa_wr), .fifo_a_data(fa_wdata), .fifo_a_full(fa_full),
    .fifo_b_rd(fb_rd), .fifo_b_data(fb_rdata), .fifo_b_empty(fb_empty)
  );

  pc_fifo #(.WIDTH(AXI_W), .DEPTH(FIFO_A_DEPTH)) u_fifo_a (
    .clk, .rst_n, .wr_en(fa_wr), .wr_data(fa_wdata), .rd_en(fa_rd),
    .rd_data(fa_rdata), .empty(fa_empty), .full(fa_full), .count());

  pc_fifo #(.WIDTH(AXI_W), .DEPTH(FIFO_B_DEPTH)) u_fifo_b (
    .clk, .rst_n, .wr_en(fb_wr), .wr_data(fb_wdata), .rd_en(fb_rd),
    .rd_data(fb_rdata), .empty(fb_empty), .full(fb_full), .count());

  logic                 in_go, in_ready, dec_start, dec_done;
  logic                 out_load, out_done;
  logic [1:0]           part;
  logic [LAT_BITS-1:0]  latent;
  logic [PART_BITS-1:0] dec_out;

  pc_fsm u_fsm (
    .clk, .rst_n, .start, .in_go, .in_ready, .dec_start, .part, .dec_done,
    .out_load, .out_done, .busy, .end_flag);

  pc_input_ctrl u_in (
    .clk, .rst_n, .go(in_go), .fifo_rd(fa_rd), .fifo_data(fa_rdata),
    .fifo_empty(fa_empty), .latent, .ready(in_ready));

  pc_decoder u_dec (
    .clk, .rst_n, .start(dec_start), .part, .latent, .out_data(dec_out),
    .busy(), .done(dec_done));

  pc_output_ctrl u_out (
    .clk, .rst_n, .load(out_load), .data(dec_out), .fifo_wr(fb_wr),
    .fifo_data(fb_wdata), .fifo_full(fb_full), .busy(), .done(out_done));
endmodule
