// sc_relu: sequential ReLU of the ShiftCNN VAE.
//
// When `en` is high at a clock edge the input is compared with zero and
// y = x (x >= 0) or 0 is registered; `done` is high for the following
// clock. The enable/done/reset handshake is the design's (the layer FSMs
// use it); one clock per value is own choice.
module sc_relu
  import sc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   x,
  output q_t   y,
  output logic done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      done <= 1'b0;
    end else begin
      done <= en;
      if (en) y <= (x < 0) ? '0 : x;
    end
  end
endmodule
