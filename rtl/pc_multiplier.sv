// pc_multiplier: the 32-way parallel multiplier of the point cloud decoder.
//
// Multiplies each of the N_LAT 16-bit latent values by its 16-bit weight in
// the same clock (all 32 weights of an output dimension come from one ROM
// address). Each 32-bit product is cut back to 16 bits, keeping the bits
// that line up with the Q3.12 operands (product bits [27:12]); the
// selection itself is the design's, the bit position follows from the
// chosen number format. Products are packed, term k in bits [16k+15:16k].
//
// Timing: MUL_LAT register stages (operand register, product register with
// the bit selection, then MUL_LAT-2 further pipeline registers, as a
// retimable multiplier pipeline), fully pipelined: one operand set per clock.
module pc_multiplier
  import pc_pkg::*;
#(
  parameter int MUL_LAT = 6
) (
  input  logic                clk,
  input  logic [LAT_BITS-1:0] z,
  input  logic [LAT_BITS-1:0] w,
  output logic [LAT_BITS-1:0] p
);
  logic [LAT_BITS-1:0] z_q, w_q;
  logic signed [2*DW-1:0] prod [N_LAT];
  logic [LAT_BITS-1:0] pipe [MUL_LAT-1];

  always_comb begin
    for (int k = 0; k < N_LAT; k++)
      prod[k] = $signed(z_q[k*DW +: DW]) * $signed(w_q[k*DW +: DW]);
  end

  always_ff @(posedge clk) begin
    z_q <= z;
    w_q <= w;
    for (int k = 0; k < N_LAT; k++)
      pipe[0][k*DW +: DW] <= prod[k][FRAC +: DW];
    for (int s = 1; s < MUL_LAT-1; s++)
      pipe[s] <= pipe[s-1];
  end

  assign p = pipe[MUL_LAT-2];
endmodule
