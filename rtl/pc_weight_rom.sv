// pc_weight_rom: weight and bias source of the point cloud decoder.
//
// One address delivers what is needed for one point (three output
// dimensions x, y, z): for each of the three a 512-bit word of 32 weights
// (16 bits each, weight k in bits [16k+15:16k]) and a 16-bit bias. Getting
// all 32 weights of a dimension at once is what lets the multiplier do 32
// multiplications per clock; three at once feed the three parallel lanes.
// The address is the point index 0..N_POINTS-1, so quarter q uses
// addresses 512q..512q+511.
//
// The trained values are not available. In their place the stand-in
// values pc_pkg::pc_weight/pc_bias are generated in logic instead of being
// stored (3 x 2,048 x 528 bits would be a 3.2 Mbit ROM): stage 1 registers
// the dimension indexes 3a+l, stage 2 multiplies each by the hash
// constant, stage 3 adds the per-weight constants and mixes. A block RAM
// with real weights can replace it with the same three-cycle latency.
//
// Timing: three-cycle latency, a new address every clock.
module pc_weight_rom
  import pc_pkg::*;
#(
  parameter int N_PTS = N_POINTS
) (
  input  logic                     clk,
  input  logic [$clog2(N_PTS)-1:0] addr,
  output logic [LAT_BITS-1:0]      w  [3],
  output fix_t                     b  [3]
);
  logic [31:0] d_q [3];
  logic [31:0] h_q [3];

  always_ff @(posedge clk) begin
    for (int l = 0; l < 3; l++) begin
      d_q[l] <= 32'(addr) * 32'd3 + 32'(l);
      h_q[l] <= d_q[l] * HASH_D;
      for (int k = 0; k < N_LAT; k++)
        w[l][k*DW +: DW] <= fix_t'($signed(pc_mix(h_q[l] + 32'(k) * HASH_K)) >>> 4);
      b[l] <= fix_t'($signed(pc_mix(h_q[l] + 32'(N_LAT) * HASH_K)) >>> 5);
    end
  end
endmodule
