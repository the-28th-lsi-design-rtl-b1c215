// pdense: partitioned dense-layer unit, Z = sum_i X_i * W_i + b for N_O
// outputs at a time, from which a host builds a large fully connected layer
// piece by piece.
//
// One operation takes an input slice X (N_I values), a weight block W
// (N_O x N_I, output o's weights at w[o*N_I +: N_I]) and a bias b (N_O),
// and returns the pre-activation Z (N_O) and its ReLU Y. A layer with M_I
// inputs and M_O outputs is computed as in the partitioned implementation:
// for each group of N_O outputs, the host runs M_I/N_I slices and feeds Z
// of one run back as b of the next (b <- Z); the first run gets the true
// bias, and Y of the last run is the layer output. Defaults N_I = 16,
// N_O = 2 are the 16x2 unit of the 256x16x256 image-compression VAE;
// N_I = 9, N_O = 2 is the unit of the 180->40 encoder layer of the
// hand-gesture VAE.
//
// How: N_I*N_O parallel multipliers (one per product, as in the drawn
// unit where each input-weight pair has its own multiplier), a sum in full
// precision, the bias added, the result scaled and saturated to 16 bits.
//
// Timing (own choice): fully pipelined, a new operation every clock,
// in_valid -> out_valid after 3 clocks (operand register, products, sum).
// Number format (own choice, not given): signed Q7.8 (FRAC = 8), product
// bits kept in full until the final shift, round toward minus infinity.
module pdense #(
  parameter int N_I  = 16,
  parameter int N_O  = 2,
  parameter int DW   = 16,
  parameter int FRAC = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic signed [DW-1:0]           x   [N_I],
  input  logic signed [DW-1:0]           w   [N_O*N_I],
  input  logic signed [DW-1:0]           b   [N_O],
  output logic                           out_valid,
  output logic signed [DW-1:0]           z   [N_O],
  output logic signed [DW-1:0]           y   [N_O]
);
  localparam int PW = 2 * DW;                    // product width
  localparam int SW = PW + $clog2(N_I) + 1;      // sum width incl. bias

  logic signed [DW-1:0] x_q [N_I];
  logic signed [DW-1:0] w_q [N_O*N_I];
  logic signed [DW-1:0] b_q [N_O], b_q2 [N_O];
  logic signed [PW-1:0] p_q [N_O*N_I];
  logic [2:0]           v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[1:0], in_valid};
  end
  assign out_valid = v[2];

  function automatic logic signed [DW-1:0] sat(input logic signed [SW-1:0] s);
    logic signed [SW-1:0] hi, lo;
    hi = SW'((1 << (DW-1)) - 1);
    lo = -SW'(1 << (DW-1));
    if (s > hi) return DW'(hi);
    if (s < lo) return DW'(lo);
    return DW'(s);
  endfunction

  always_ff @(posedge clk) begin
    x_q <= x;
    w_q <= w;
    b_q <= b;
    for (int i = 0; i < N_O*N_I; i++) p_q[i] <= w_q[i] * x_q[i % N_I];
    b_q2 <= b_q;
    for (int o = 0; o < N_O; o++) begin
      logic signed [SW-1:0] s;
      s = '0;
      for (int i = 0; i < N_I; i++) s += SW'(p_q[o*N_I + i]);
      s = (s >>> FRAC) + SW'(b_q2[o]);
      z[o] <= sat(s);
      y[o] <= sat(s) < 0 ? '0 : sat(s);
    end
  end
endmodule
