// pc_decoder: Decoder Circuit of the point cloud generator, one quarter at a
// time.
//
// The decoder is one fully connected layer, 32 latent inputs -> 6,144
// outputs (2,048 points x, y, z). Producing all 98,304 output bits at once
// needs too many wires, so the weight matrix is split into four row blocks
// (quarters); one run of this module computes the 1,536 outputs of quarter
// `part` (512 points, 24,576 bits). Every clock one point is issued: its
// three weight rows and biases are read from the weight ROM, the three
// lanes of pc_weight_mult form the 21-bit dot products, the bias (delayed
// to match) is added, the result is saturated to 16 bits and shifted into
// the 24,576-bit shift register. After 512 issues the register holds point
// p of the quarter in bits [48p+47:48p] as {z, y, x}.
//
// Timing: fully pipelined. One point passes ROM 3, multiplier MUL_LAT (6,
// operand register included), adder tree 5, bias add 1, saturation 1 and
// shift register 1 = 17 stages; with one point issued per clock a quarter
// takes 17 + 512 = 529 clocks, counted from the clock that samples `start`
// to the clock in which `done` (a one-clock pulse) is high. `latent` must
// be stable while busy. The stage split is an own choice; the 17 clocks
// per point and 529 clocks per quarter are the design's.
//
// The assertion uses rst_n in `disable iff`, so verilator reports rst_n as
// both synchronous and asynchronous (SYNCASYNCNET); the flip-flops use the
// asynchronous reset only.
//
// Own choices: saturation of the 22-bit biased sum to 16 bits; Q3.12.
module pc_decoder
  import pc_pkg::*;
#(
  parameter int MUL_LAT = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [1:0]           part,
  input  logic [LAT_BITS-1:0]  latent,
  output logic [PART_BITS-1:0] out_data,
  output logic                 busy,
  output logic                 done
);
  localparam int AW       = $clog2(N_POINTS);
  localparam int CW       = $clog2(PTS_PART);
  localparam int WM_LAT   = MUL_LAT + $clog2(N_LAT);     // product + tree
  localparam int ROM_LAT  = 3;
  localparam int VLD_LAT  = ROM_LAT + WM_LAT + 1;         // ROM .. saturation

  // ---- issue counter --------------------------------------------------
  logic          issuing;
  logic [CW-1:0] cnt;
  logic [AW-1:0] addr;
  logic          issue_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      cnt     <= '0;
      addr    <= '0;
      issue_v <= 1'b0;
    end else begin
      issue_v <= 1'b0;
      if (start && !busy) begin
        issuing <= 1'b1;
        cnt     <= '0;
        addr    <= {part, CW'(0)};
        issue_v <= 1'b1;
      end else if (issuing) begin
        if (cnt == CW'(PTS_PART-1)) begin
          issuing <= 1'b0;
        end else begin
          cnt     <= cnt + 1'b1;
          addr    <= addr + 1'b1;
          issue_v <= 1'b1;
        end
      end
    end
  end

  // ---- weight ROM and weight multiplication ---------------------------
  logic [LAT_BITS-1:0] w [3];
  fix_t                b [3];
  logic [3*SUM_W-1:0]  sums;

  pc_weight_rom  u_rom (.clk, .addr, .w, .b);
  pc_weight_mult #(.MUL_LAT(MUL_LAT)) u_wm (.clk, .z(latent), .w, .sum(sums));

  // bias delayed to meet the sums
  fix_t b_dly [WM_LAT][3];
  always_ff @(posedge clk) begin
    b_dly[0] <= b;
    for (int s = 1; s < WM_LAT; s++) b_dly[s] <= b_dly[s-1];
  end

  // valid flags along the pipeline
  logic [VLD_LAT:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[VLD_LAT-1:0], issue_v};
  end

  // ---- bias add and saturation ----------------------------------------
  logic signed [SUM_W:0] biased [3];
  fix_t                  sat    [3];

  function automatic fix_t saturate(input logic signed [SUM_W:0] v);
    if (v > (SUM_W+1)'(32767))        return fix_t'(16'sh7FFF);
    else if (v < -(SUM_W+1)'(32768))  return fix_t'(16'sh8000);
    else                              return fix_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    for (int l = 0; l < 3; l++) begin
      biased[l] <= (SUM_W+1)'($signed(sums[l*SUM_W +: SUM_W]))
                 + (SUM_W+1)'(b_dly[WM_LAT-1][l]);
      sat[l]    <= saturate(biased[l]);
    end
  end

  // ---- shift register ---------------------------------------------------
  logic [CW:0] n_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_out    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) n_out <= '0;
      if (vld[VLD_LAT]) begin
        n_out    <= n_out + 1'b1;
        if (n_out == (CW+1)'(PTS_PART-1)) done <= 1'b1;
      end
    end
  end

  // data only, no reset
  always_ff @(posedge clk)
    if (vld[VLD_LAT]) out_data <= {sat[2], sat[1], sat[0], out_data[PART_BITS-1:3*DW]};

  assign busy = issuing || (|vld);

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
