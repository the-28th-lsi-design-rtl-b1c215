// pc_adder_tree: tournament adder of the point cloud decoder.
//
// Adds the 32 selected 16-bit products of one output dimension. Instead of
// a chain of 31 additions, pairs are added level by level (16, 8, 4, 2, 1
// sums), one register level per stage, so the sum takes log2(32) = 5 clocks
// and a new set of terms is accepted every clock. Every level works in
// SUM_W = 21 bits (16 bits plus 5 guard bits), which is enough for the 5
// carries that 32 terms can produce, so no overflow can occur.
module pc_adder_tree
  import pc_pkg::*;
(
  input  logic                    clk,
  input  logic [LAT_BITS-1:0]     terms,
  output logic signed [SUM_W-1:0] sum
);
  localparam int LV = $clog2(N_LAT);   // 5 levels

  logic signed [SUM_W-1:0] lvl [LV+1][N_LAT];

  always_comb begin
    for (int k = 0; k < N_LAT; k++)
      lvl[0][k] = SUM_W'($signed(terms[k*DW +: DW]));
  end

  for (genvar s = 0; s < LV; s++) begin : g_lvl
    for (genvar k = 0; k < N_LAT; k++) begin : g_node
      if (k < (N_LAT >> (s+1))) begin : g_add
        always_ff @(posedge clk) lvl[s+1][k] <= lvl[s][2*k] + lvl[s][2*k+1];
      end else begin : g_unused
        assign lvl[s+1][k] = '0;
      end
    end
  end

  assign sum = lvl[LV][0];
endmodule
