// sc_lut: look-up tables for the exponential and the sigmoid of the
// ShiftCNN VAE.
//
// sel = 0: y = exp(x) (used by the reparameterisation), Q10.10 in and
// out; as the output has the input's width, results above the largest
// Q10.10 value saturate, so useful inputs lie below about 6.9.
// sel = 1: y = sigmoid(x) (activation of the last decoder layers), stored
// with 11 bits (0..1024 = 0..1.0) and zero-extended by 9 bits to 20 bits.
//
// Both tables quantise the input to 1/16 (IDX_SHIFT = 6 fraction bits
// dropped, so the low six input bits are unused) over [-8, +8): 256
// entries each; inputs outside are clamped to
// the end entries. Resolution and range are own choices; the table
// contents are computed at elaboration, the entry for index i holds the
// function value at the lower end of its interval.
//
// Timing: one clock (registered output).
module sc_lut
  import sc_pkg::*;
#(
  parameter int IDX_W     = 8,
  parameter int IDX_SHIFT = 6
) (
  input  logic clk,
  input  logic sel,
  input  q_t   x,
  output q_t   y
);
  localparam int N = 1 << IDX_W;

  logic [XW-1:0] exp_t [N];
  logic [10:0]   sig_t [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      real v, e;
      v = real'(i - N/2) / real'(1 << (FRAC - IDX_SHIFT));
      e = $exp(v) * real'(1 << FRAC);
      exp_t[i] = (e >= real'(QMAX)) ? XW'(QMAX) : XW'($rtoi(e));
      sig_t[i] = 11'($rtoi(real'(1 << FRAC) / (1.0 + $exp(-v))));
    end
  end

  // index: x / 2^IDX_SHIFT + N/2, clamped
  logic signed [XW-IDX_SHIFT-1:0] q;
  logic [IDX_W-1:0]               idx;
  assign q = x[XW-1:IDX_SHIFT];

  always_comb begin
    if (int'(q) < -(N/2)) idx = '0;
    else if (int'(q) >= N/2) idx = IDX_W'(N - 1);
    else                idx = IDX_W'(q + N/2);
  end

  always_ff @(posedge clk)
    y <= sel ? q_t'({9'b0, sig_t[idx]}) : q_t'(exp_t[idx]);
endmodule
