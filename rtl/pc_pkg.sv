// pc_pkg: shared constants, types and the weight-table formula of the point
// cloud generator (a VAE decoder that turns a 32-dimensional latent vector
// into 2,048 points of x/y/z coordinates).
//
// Sizes follow the design: 32 latent dimensions of 16 bits, 6,144 output
// dimensions (2,048 points x 3), computed in four quarters of 512 points,
// three output dimensions (one point) per clock, a 21-bit adder tree.
//
// Own choices: the 16-bit numbers are signed fixed point with 12 fraction
// bits (Q3.12); the product keeps bits [27:12]. The trained weights are not
// available, so the weight source delivers a deterministic stand-in defined
// by pc_weight()/pc_bias() below (an integer hash scaled to +-0.5 / +-0.25),
// cheap enough to be generated in logic. Replace pc_weight_rom with a block
// RAM holding real weights to run a trained model.
package pc_pkg;

  localparam int N_LAT      = 32;               // latent dimensions
  localparam int DW         = 16;               // data width of every value
  localparam int FRAC       = 12;               // fraction bits (own choice)
  localparam int N_POINTS   = 2048;             // points per cloud
  localparam int N_DIMS     = N_POINTS * 3;     // 6,144 output dimensions
  localparam int N_PARTS    = 4;                // output computed in quarters
  localparam int PTS_PART   = N_POINTS / N_PARTS;        // 512 points
  localparam int PART_BITS  = PTS_PART * 3 * DW;         // 24,576 bits
  localparam int LAT_BITS   = N_LAT * DW;                // 512 bits
  localparam int SUM_W      = DW + $clog2(N_LAT);        // 21 bits
  localparam int AXI_W      = 32;
  localparam int FIFO_A_DEPTH = LAT_BITS / AXI_W;        // 16 words
  localparam int FIFO_B_DEPTH = N_DIMS * DW / AXI_W;     // 3,072 words

  typedef logic signed [DW-1:0] fix_t;

  // integer hash used for the stand-in weight values
  localparam logic [31:0] HASH_D = 32'h9E3779B1;  // per dimension step
  localparam logic [31:0] HASH_K = 32'h7F4A7C15;  // per weight step

  // 16-bit mix of the hash state d*HASH_D + k*HASH_K
  function automatic logic [15:0] pc_mix(input logic [31:0] h);
    return h[15:0] ^ h[31:16];
  endfunction

  // weight k (0..31) of output dimension d (0..6143), Q3.12, |w| <= 0.5
  function automatic fix_t pc_weight(input int unsigned d, input int unsigned k);
    logic [15:0] m;
    m = pc_mix(d * HASH_D + k * HASH_K);
    return fix_t'($signed(m) >>> 4);
  endfunction

  // bias of output dimension d, Q3.12, |b| <= 0.25
  function automatic fix_t pc_bias(input int unsigned d);
    logic [15:0] m;
    m = pc_mix(d * HASH_D + N_LAT * HASH_K);
    return fix_t'($signed(m) >>> 5);
  endfunction

endpackage
