// sc_pkg: number format and helpers of the ShiftCNN VAE (28x28 image VAE
// whose convolution and dense weights are sums of two signed powers of two,
// so multiplications become shifts).
//
// From the design: fixed point with 10 integer and 10 fraction bits
// (20 bits, Q10.10) for every layer; a weight term is {sign, direction,
// 8-bit shift amount} (sign 1 = negative, direction 1 = right shift), and
// each weight uses two terms whose shifted results are added.
// Own choices: integer part includes the sign bit (signed Q10.10, range
// -512..+512); results saturate; right shifts are arithmetic.
package sc_pkg;
  localparam int XW   = 20;            // data width
  localparam int FRAC = 10;            // fraction bits
  localparam int TW   = 10;            // one weight term: sign, dir, 8-bit amount

  typedef logic signed [XW-1:0] q_t;

  localparam q_t QMAX = q_t'({1'b0, {(XW-1){1'b1}}});
  localparam q_t QMIN = q_t'({1'b1, {(XW-1){1'b0}}});

  function automatic q_t qsat(input logic signed [63:0] v);
    if (v > 64'(QMAX)) return QMAX;
    if (v < 64'(QMIN)) return QMIN;
    return q_t'(v);
  endfunction

  // x * (+-2^(+-amount)) for one weight term, kept wide (no rounding
  // other than the arithmetic right shift)
  function automatic logic signed [63:0] shift_term(input q_t x, input logic [TW-1:0] t);
    logic signed [63:0] v;
    logic [7:0]         sh;
    sh = t[7:0];
    if (t[8]) begin                                  // right shift
      v = (sh >= 8'(XW)) ? (x < 0 ? -64'sd1 : 64'sd0) : 64'(x) >>> sh;
    end else begin                                   // left shift
      if (sh >= 8'(XW)) v = (x == 0) ? 64'sd0 : (x < 0 ? 64'(QMIN) * 64'sd2 : 64'(QMAX) * 64'sd2);
      else              v = 64'(x) <<< sh;
    end
    return t[9] ? -v : v;
  endfunction
endpackage
