// pc_fifo: synchronous first-in first-out buffer of WIDTH-bit words.
//
// The point cloud generator uses two of them between the AXI4-Lite
// registers and the calculation circuit: FIFO A (32 bits x 16) carries the
// packed latent vector in, FIFO B (32 bits x 3,072) carries the generated
// coordinates out. Widths and depths are the design's; the structure (a
// circular array with read/write pointers and a fill counter, first-word
// fall-through read port) is an own choice.
//
// Timing: a word written in one cycle is visible on rd_data the next cycle.
// rd_data always shows the oldest word; rd_en pops it. A write while full or
// a read while empty is ignored (and flagged by an assertion). The
// assertions use rst_n in `disable iff`, which verilator reports as a reset
// used both synchronously and asynchronously (SYNCASYNCNET); the
// flip-flops use the asynchronous reset only.
module pc_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
