// pc_weight_mult: Weight Multiplication Circuit of the point cloud decoder.
//
// Three identical lanes, one per coordinate (x, y, z) of a point. Each lane
// multiplies the 32 latent values by the 32 weights of its output dimension
// (pc_multiplier) and adds the products in a tournament adder tree
// (pc_adder_tree). The three 21-bit sums are concatenated into 63 bits:
// lane 0 (x) in bits [20:0], lane 1 (y) in [41:21], lane 2 (z) in [62:42].
//
// Timing: MUL_LAT + 5 clocks from operands to sum, one operand set per
// clock.
module pc_weight_mult
  import pc_pkg::*;
#(
  parameter int MUL_LAT = 6
) (
  input  logic                clk,
  input  logic [LAT_BITS-1:0] z,
  input  logic [LAT_BITS-1:0] w   [3],
  output logic [3*SUM_W-1:0]  sum
);
  for (genvar l = 0; l < 3; l++) begin : g_lane
    logic [LAT_BITS-1:0]     prod;
    logic signed [SUM_W-1:0] s;
    pc_multiplier #(.MUL_LAT(MUL_LAT)) u_mul (.clk, .z, .w(w[l]), .p(prod));
    pc_adder_tree                      u_add (.clk, .terms(prod), .sum(s));
    assign sum[l*SUM_W +: SUM_W] = s;
  end
endmodule
