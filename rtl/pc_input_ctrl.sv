// pc_input_ctrl: Input Data Control of the point cloud generator.
//
// The decoder needs the whole latent vector (32 dimensions x 16 bits = 512
// bits) at once, but it arrives from the processor as 32-bit words in
// FIFO A. After `go` this block pops N_WORDS (16) words, one per clock while
// the FIFO is not empty, and places word i in latent[32i+31:32i] (word i
// carries latent dimensions 2i in its low half and 2i+1 in its high half,
// the packing done by the processor). `latent` is held until the next `go`;
// `ready` pulses for one clock when the vector is complete.
module pc_input_ctrl
  import pc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                go,
  output logic                fifo_rd,
  input  logic [AXI_W-1:0]    fifo_data,
  input  logic                fifo_empty,
  output logic [LAT_BITS-1:0] latent,
  output logic                ready
);
  localparam int N_WORDS = LAT_BITS / AXI_W;
  localparam int IW      = $clog2(N_WORDS + 1);

  logic          active;
  logic [IW-1:0] idx;

  assign fifo_rd = active && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      idx    <= '0;
      latent <= '0;
      ready  <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (go) begin
        active <= 1'b1;
        idx    <= '0;
      end else if (fifo_rd) begin
        latent[idx[IW-2:0]*AXI_W +: AXI_W] <= fifo_data;
        idx <= idx + 1'b1;
        if (idx == IW'(N_WORDS-1)) begin
          active <= 1'b0;
          ready  <= 1'b1;
        end
      end
    end
  end
endmodule
