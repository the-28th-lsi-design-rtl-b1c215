// ac_top: angle completion decoder, the programmable-logic part of a VAE
// system that draws an object from a viewpoint between the ones it was
// trained on.
//
// The processor supplies a latent pair (z1 in bits 15:0, z2 in 31:16, e.g.
// the mean of two viewpoints' latent vectors) and pulses `start`. The
// decoder streams the 256 cells of the 16x16 map through a pipeline, one
// cell per clock: read weight and bias (ac_rom), multiply by the latent
// values and add the bias (ac_fc), split the kernel, multiply and
// scatter-add into the 32x32 array (ac_deconv). Then the data controller
// stores and forms the 16,384-bit image (ac_data_ctrl), `end_sig` pulses,
// and the image follows as 512 words through the output FIFO.
//
// Timing: 264 clocks from the clock that samples `start` up to and
// including the `end_sig` clock (256 cells + 8 pipeline steps), the count
// the design states; the FIFO then fills in 512 more clocks. The latent
// word is registered at `start`; a `start` while busy is ignored.
module ac_top
  import ac_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [31:0]         z,
  input  logic                start,
  output logic                busy,
  output logic                end_sig,
  output logic [IMG_BITS-1:0] img_bits,
  input  logic                rd_en,
  output logic [31:0]         rd_data,
  output logic                rd_empty
);
  localparam int FIFO_DEPTH = IMG_BITS / 32;

  logic        running;
  logic [7:0]  cnt, addr;
  logic [31:0] z_q;

  assign addr = running ? cnt : 8'd0;
  wire   go   = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      z_q     <= '0;
    end else if (go) begin
      running <= 1'b1;
      cnt     <= 8'd1;
      z_q     <= z;
    end else if (running) begin
      cnt <= cnt + 1'b1;
      if (cnt == 8'(N_CELLS-1)) running <= 1'b0;
    end
  end

  // cell index and valid along ROM (1) and FC (2) stages; last-cell flag
  // along ROM, FC and deconvolution (3) stages
  logic       vld  [3];
  logic [7:0] idx  [3];
  logic       last [6];
  wire        issue = go || running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '{default: 1'b0};
      idx  <= '{default: '0};
      last <= '{default: 1'b0};
    end else begin
      vld[0]  <= issue;
      idx[0]  <= addr;
      last[0] <= running && (cnt == 8'(N_CELLS-1));
      for (int s = 1; s < 3; s++) begin vld[s] <= vld[s-1]; idx[s] <= idx[s-1]; end
      for (int s = 1; s < 6; s++) last[s] <= last[s-1];
    end
  end

  logic [31:0]         w;
  fix_t                b, a;
  logic [KS*KS*DW-1:0] kernel;
  fix_t                img [OUT_DIM][OUT_DIM];

  ac_rom u_rom (.clk, .addr, .w, .b, .kernel);
  ac_fc  u_fc  (.clk, .z(z_q), .w, .b, .a);
  ac_deconv u_dc (
    .clk, .rst_n, .clear(go), .a_valid(vld[2]), .a,
    .row(idx[2][7:4]), .col(idx[2][3:0]), .kernel, .img);

  logic fifo_wr, fifo_full, dc_busy;
  logic [31:0] fifo_wdata;

  ac_data_ctrl u_ctrl (
    .clk, .rst_n, .store(last[5]), .img, .img_bits, .end_sig,
    .fifo_wr, .fifo_data(fifo_wdata), .fifo_full, .busy(dc_busy));

  pc_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr), .wr_data(fifo_wdata), .rd_en,
    .rd_data, .empty(rd_empty), .full(fifo_full), .count());

  assign busy = running || vld[0] || vld[1] || vld[2] || (|{last[0], last[1], last[2], last[3], last[4], last[5]}) || dc_busy;
endmodule
