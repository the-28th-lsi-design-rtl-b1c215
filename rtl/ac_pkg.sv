// ac_pkg: shared constants, types and helper functions of the angle
// completion decoder (a VAE decoder that turns two latent values into a
// 32x32 grayscale view of an object).
//
// From the design: two 16-bit latent values, a fully connected layer to
// 256 (16x16) cells, each cell A = z1*w11 + z2*w12 + b1 with a 32-bit
// weight word (w11 low half, w12 high half) and a 16-bit bias, a 3x3
// transposed convolution with a 144-bit kernel (nine 16-bit values) and
// stride 2 to a 32x32 image of 16-bit pixels (16,384 bits).
//
// Own choices: 16-bit values are signed fixed point with 8 fraction bits
// (Q7.8); the 16-bit multiply keeps product bits [23:8] and saturates;
// additions saturate to 16 bits; the transposed convolution keeps output
// rows/columns 0..31 of the 33x33 full result (the 'same' cropping of a
// stride-2, 3x3 transposed convolution). The trained weights are not
// available: ac_w/ac_b/ac_k give a deterministic stand-in.
package ac_pkg;

  localparam int DW      = 16;
  localparam int FRAC    = 8;
  localparam int IN_DIM  = 16;                    // 16x16 cells after the FC layer
  localparam int N_CELLS = IN_DIM * IN_DIM;       // 256
  localparam int OUT_DIM = 32;                    // 32x32 output image
  localparam int STRIDE  = 2;
  localparam int KS      = 3;                     // 3x3 kernel
  localparam int IMG_BITS = OUT_DIM * OUT_DIM * DW;   // 16,384

  typedef logic signed [DW-1:0] fix_t;

  function automatic fix_t sat16(input longint v);
    if (v > 32767)  return fix_t'(16'sh7FFF);
    if (v < -32768) return fix_t'(16'sh8000);
    return fix_t'(v);
  endfunction

  // product of two Q7.8 numbers, rounded toward minus infinity, saturated
  function automatic fix_t fxmul(input fix_t a, input fix_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return sat16(longint'(p) >>> FRAC);
  endfunction

  function automatic logic [31:0] ac_hash(input logic [31:0] x);
    logic [31:0] h;
    h = (x + 32'h7F4A_7C15) * 32'h9E3779B1;
    h = h ^ (h >> 16);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return h;
  endfunction

  // stand-in contents of the weight ROM: {w12, w11} of cell c, |w| < 1
  function automatic logic [31:0] ac_w(input int unsigned c);
    logic [31:0] h;
    h = ac_hash(c);
    return {16'($signed(h[31:16]) >>> 7), 16'($signed(h[15:0]) >>> 7)};
  endfunction

  // bias of cell c, |b| < 0.5
  function automatic fix_t ac_b(input int unsigned c);
    logic [31:0] h;
    h = ac_hash(c + 32'h0001_0000);
    return fix_t'($signed(h[15:0] ^ h[31:16]) >>> 8);
  endfunction

  // the 144-bit transposed-convolution kernel, tap (dy,dx) in bits
  // [16*(3*dy+dx) +: 16], |k| < 1
  function automatic logic [KS*KS*DW-1:0] ac_k();
    logic [KS*KS*DW-1:0] k;
    for (int t = 0; t < KS*KS; t++) begin
      logic [31:0] h;
      h = ac_hash(32'h0002_0000 + t);
      k[DW*t +: DW] = 16'($signed(h[15:0] ^ h[31:16]) >>> 7);
    end
    return k;
  endfunction

endpackage
