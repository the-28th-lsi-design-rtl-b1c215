// ac_data_ctrl: data controller at the output of the angle completion
// decoder.
//
// `store` copies the 32x32 accumulation array (the "store output data"
// step); the next clock forms it into the 16,384-bit output array, pixel
// (r,c) at bits [16*(32r+c) +: 16] (the "output data forming" step); the
// clock after that `end_sig` pulses (the "send end signal" step). The formed
// array is then written to the output FIFO as 512 32-bit words, lowest
// first (word j = pixels 2j and 2j+1), one per clock while the FIFO is not
// full. Step names and the 16,384-bit array are the design's; the word
// order and handshake are own choices.
module ac_data_ctrl
  import ac_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                store,
  input  fix_t                img [OUT_DIM][OUT_DIM],
  output logic [IMG_BITS-1:0] img_bits,
  output logic                end_sig,
  output logic                fifo_wr,
  output logic [31:0]         fifo_data,
  input  logic                fifo_full,
  output logic                busy
);
  localparam int N_WORDS = IMG_BITS / 32;   // 512
  localparam int CW      = $clog2(N_WORDS + 1);

  fix_t          stored [OUT_DIM][OUT_DIM];
  logic          form_q;
  logic [IMG_BITS-1:0] sr;
  logic [CW-1:0] left;

  assign busy      = form_q || end_sig || (left != 0);
  assign fifo_wr   = (left != 0) && !fifo_full;
  assign fifo_data = sr[31:0];

  // data registers, no reset
  always_ff @(posedge clk) begin
    if (store) stored <= img;
    if (form_q) begin
      for (int r = 0; r < OUT_DIM; r++)
        for (int c = 0; c < OUT_DIM; c++)
          img_bits[DW*(OUT_DIM*r + c) +: DW] <= stored[r][c];
    end
    if (end_sig)      sr <= img_bits;
    else if (fifo_wr) sr <= {32'h0, sr[IMG_BITS-1:32]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      form_q   <= 1'b0;
      end_sig  <= 1'b0;
      left     <= '0;
    end else begin
      form_q  <= store;
      end_sig <= form_q;
      if (end_sig)      left <= CW'(N_WORDS);
      else if (fifo_wr) left <= left - 1'b1;
    end
  end
endmodule
