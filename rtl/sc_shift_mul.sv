// sc_shift_mul: shift-based multiplier of the ShiftCNN VAE.
//
// Multiplies a Q10.10 value x by a weight made of two terms,
// w = {term1, term0}, each {sign, direction, 8-bit shift amount}: each
// term shifts x left or right by its amount and negates it if the sign bit
// is set; the two results are added (the two-term quantisation of the
// design) and saturated to 20 bits. No multiplier is used.
//
// Timing: one clock (registered output), a new operand every clock.
module sc_shift_mul
  import sc_pkg::*;
(
  input  logic            clk,
  input  q_t              x,
  input  logic [2*TW-1:0] w,
  output q_t              y
);
  always_ff @(posedge clk)
    y <= qsat(shift_term(x, w[TW-1:0]) + shift_term(x, w[2*TW-1:TW]));
endmodule
