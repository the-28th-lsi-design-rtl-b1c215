// ac_fc: one cell of the all-combining (fully connected) layer of the angle
// completion decoder, A = z1*w11 + z2*w12 + b1.
//
// The 32-bit latent word carries z1 in its low and z2 in its high 16 bits;
// the 32-bit weight word likewise carries w11 and w12. Both products use the
// 16-bit fixed-point multiply of ac_pkg (fxmul); the sum is saturated to
// 16 bits. Timing: two pipeline stages, the "multiply input data and weight
// data" and "add bias" steps, one cell per clock; the bias is delayed one
// clock inside to meet the products.
module ac_fc
  import ac_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] z,
  input  logic [31:0] w,
  input  fix_t        b,
  output fix_t        a
);
  fix_t p1, p2, b_q;
  always_ff @(posedge clk) begin
    p1  <= fxmul(fix_t'(z[15:0]),  fix_t'(w[15:0]));
    p2  <= fxmul(fix_t'(z[31:16]), fix_t'(w[31:16]));
    b_q <= b;
    a   <= sat16(longint'(p1) + longint'(p2) + longint'(b_q));
  end
endmodule
