// sv_fpu: arithmetic unit for the 16-bit number format of the stacked VAE
// (SVAE) arrhythmia classifier: 1 sign bit, 4 exponent bits, 11 mantissa
// bits, {s, e[3:0], m[10:0]}.
//
// Operations (op): 0 add a+b, 1 multiply a*b, 2 ReLU(a); the building
// blocks of the dense layers y = ReLU(W x + b) of the SVAE encoders.
//
// The field widths come from the design; their meaning is an own choice:
// value = (-1)^s * 1.m * 2^(e-7) for e = 1..15 (bias 7, range 2^-6 to
// just under 512), e = 0 is zero (no subnormals, no infinity or NaN).
// Results are exact sums/products truncated toward zero to 11 mantissa
// bits; magnitudes above the largest number saturate to it, magnitudes
// below 2^-6 become +0. The adder aligns both operands on a 27-bit grid
// (12-bit significand + 14 steps of exponent difference), so the sum is
// exact before truncation.
//
// Timing: one clock, in_valid -> out_valid, one operation per clock.
module sv_fpu #(
  parameter int EW   = 4,
  parameter int MW   = 11,
  parameter int BIAS = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [1:0]       op,
  input  logic [EW+MW:0]   a,
  input  logic [EW+MW:0]   b,
  output logic             out_valid,
  output logic [EW+MW:0]   y
);
  localparam int W    = EW + MW + 1;               // 16
  localparam int EMAX = (1 << EW) - 1;             // 15
  localparam int GW   = MW + 1 + EMAX - 1;         // 26-bit alignment grid
  localparam logic [W-2:0] MAXMAG = {EW'(EMAX), {MW{1'b1}}};

  function automatic logic [W-1:0] pack(input logic s, input int e, input logic [MW-1:0] m);
    if (e > EMAX) return {s, MAXMAG};
    if (e < 1)    return '0;
    return {s, EW'(e), m};
  endfunction

  function automatic logic [W-1:0] fmul(input logic [W-1:0] x, input logic [W-1:0] z);
    logic [2*MW+1:0] p;
    int              e;
    if (x[W-2 -: EW] == '0 || z[W-2 -: EW] == '0) return '0;
    p = {1'b1, x[MW-1:0]} * {1'b1, z[MW-1:0]};
    e = int'(x[W-2 -: EW]) + int'(z[W-2 -: EW]) - BIAS;
    if (p[2*MW+1]) return pack(x[W-1] ^ z[W-1], e + 1, p[2*MW -: MW]);
    return pack(x[W-1] ^ z[W-1], e, p[2*MW-1 -: MW]);
  endfunction

  function automatic logic [W-1:0] fadd(input logic [W-1:0] x, input logic [W-1:0] z);
    logic signed [GW+2:0] vx, vz, s;
    logic [GW+1:0]        mag;
    int                   lead;
    logic [MW-1:0]        m;
    vx = '0;
    vz = '0;
    if (x[W-2 -: EW] != '0) vx = (GW+3)'({1'b1, x[MW-1:0]}) << (x[W-2 -: EW] - 1);
    if (z[W-2 -: EW] != '0) vz = (GW+3)'({1'b1, z[MW-1:0]}) << (z[W-2 -: EW] - 1);
    if (x[W-1]) vx = -vx;
    if (z[W-1]) vz = -vz;
    s   = vx + vz;
    mag = (GW+2)'(s < 0 ? -s : s);
    lead = -1;
    for (int i = 0; i < GW + 2; i++) if (mag[i]) lead = i;
    if (lead < 0) return '0;
    // the MW bits below the leading one (truncated)
    if (lead >= MW) m = MW'(mag >> (lead - MW));
    else            m = MW'(mag << (MW - lead));
    // value = mag * 2^(1-BIAS-MW); exponent field = lead - MW + 1
    return pack(s < 0, lead - MW + 1, m);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        case (op)
          2'd0:    y <= fadd(a, b);
          2'd1:    y <= fmul(a, b);
          default: y <= (a[W-1] || a[W-2 -: EW] == '0) ? '0 : a;
        endcase
      end
    end
  end
endmodule
