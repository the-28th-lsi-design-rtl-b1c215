// pc_output_ctrl: Output Data Control of the point cloud generator.
//
// The decoder delivers one quarter of the result as a 24,576-bit word; the
// processor reads 32-bit words. On `load` this block copies the wide word
// and then writes it to FIFO B 32 bits at a time, lowest bits first (word j
// = data[32j+31:32j], i.e. output dimensions 2j and 2j+1 of the quarter),
// one word per clock while the FIFO is not full. `done` pulses after the
// last (768th) word. The copy lets the decoder start on the next quarter
// while this block drains (the sequencer here does not overlap them).
module pc_output_ctrl
  import pc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [PART_BITS-1:0] data,
  output logic                 fifo_wr,
  output logic [AXI_W-1:0]     fifo_data,
  input  logic                 fifo_full,
  output logic                 busy,
  output logic                 done
);
  localparam int N_WORDS = PART_BITS / AXI_W;   // 768
  localparam int CW      = $clog2(N_WORDS + 1);

  logic [PART_BITS-1:0] sr;
  logic [CW-1:0]        left;

  assign busy      = (left != 0);
  assign fifo_wr   = busy && !fifo_full;
  assign fifo_data = sr[AXI_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !busy) begin
        left <= CW'(N_WORDS);
      end else if (fifo_wr) begin
        left <= left - 1'b1;
        if (left == CW'(1)) done <= 1'b1;
      end
    end
  end

  // data only, no reset
  always_ff @(posedge clk) begin
    if (load && !busy) sr <= data;
    else if (fifo_wr)  sr <= {AXI_W'(0), sr[PART_BITS-1:AXI_W]};
  end
endmodule
