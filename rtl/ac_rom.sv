// ac_rom: weight ROM of the angle completion decoder.
//
// Address c (0..255) returns the 32-bit weight word of fully connected
// cell c (w11 in the low half, w12 in the high half) and its 16-bit bias.
// The 144-bit transposed-convolution kernel (nine 16-bit taps) is a
// separate constant output. Timing: one clock of read latency (the "read
// weight and bias data" step of the pipeline). Contents are the stand-in
// values of ac_pkg, initialised into arrays that map to block RAM.
module ac_rom
  import ac_pkg::*;
(
  input  logic                   clk,
  input  logic [7:0]             addr,
  output logic [31:0]            w,
  output fix_t                   b,
  output logic [KS*KS*DW-1:0]    kernel
);
  logic [31:0] wrom [N_CELLS];
  fix_t        brom [N_CELLS];

  initial begin
    for (int c = 0; c < N_CELLS; c++) begin
      wrom[c] = ac_w(c);
      brom[c] = ac_b(c);
    end
  end

  assign kernel = ac_k();

  always_ff @(posedge clk) begin
    w <= wrom[addr];
    b <= brom[addr];
  end
endmodule
