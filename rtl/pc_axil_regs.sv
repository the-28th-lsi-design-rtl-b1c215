// pc_axil_regs: AXI4-Lite slave through which the processor drives the
// point cloud generator.
//
// Register map (the design's, byte addresses):
//   0x00 write: bit 0 = 1 starts a computation (one-clock `start` pulse)
//        read : bit 0 = busy
//   0x04 read : bit 0 = end of computation flag
//   0x08 write: the 32-bit word is pushed into FIFO A (latent data)
//   0x0C read : pops the oldest word of FIFO B (output data); 0 if empty
// The reset signal of the register table is taken to be the bus reset
// ARESETn (own reading). Handshake: one write and one read in flight at a
// time; a write is accepted when AWVALID and WVALID are both high; BRESP and
// RRESP are always OKAY. Unused address bits are ignored. Assertions check
// that BVALID and RVALID hold until accepted; their `disable iff (!rst_n)`
// makes verilator report rst_n as both synchronous and asynchronous
// (SYNCASYNCNET), while the flip-flops use the asynchronous reset only.
module pc_axil_regs
  import pc_pkg::*;
#(
  parameter int ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [AXI_W-1:0]  s_wdata,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [AXI_W-1:0]  s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // to the calculation circuit
  output logic              start,
  input  logic              busy,
  input  logic              end_flag,
  output logic              fifo_a_wr,
  output logic [AXI_W-1:0]  fifo_a_data,
  input  logic              fifo_a_full,
  output logic              fifo_b_rd,
  input  logic [AXI_W-1:0]  fifo_b_data,
  input  logic              fifo_b_empty
);
  localparam logic [3:0] A_CTRL = 4'h0, A_END = 4'h4, A_FIFO_A = 4'h8, A_FIFO_B = 4'hC;

  wire wr_go = s_awvalid && s_wvalid && !s_bvalid;
  wire rd_go = s_arvalid && !s_rvalid;
  wire [3:0] wa = 4'(s_awaddr);
  wire [3:0] ra = 4'(s_araddr);

  assign s_awready   = wr_go;
  assign s_wready    = wr_go;
  assign s_arready   = rd_go;
  assign s_bresp     = 2'b00;
  assign s_rresp     = 2'b00;

  assign start       = wr_go && (wa == A_CTRL) && s_wdata[0];
  assign fifo_a_wr   = wr_go && (wa == A_FIFO_A) && !fifo_a_full;
  assign fifo_a_data = s_wdata;
  assign fifo_b_rd   = rd_go && (ra == A_FIFO_B) && !fifo_b_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (wr_go)                      s_bvalid <= 1'b1;
      else if (s_bvalid && s_bready)  s_bvalid <= 1'b0;

      if (rd_go) begin
        s_rvalid <= 1'b1;
        unique case (ra)
          A_CTRL:   s_rdata <= AXI_W'(busy);
          A_END:    s_rdata <= AXI_W'(end_flag);
          A_FIFO_B: s_rdata <= fifo_b_empty ? '0 : fifo_b_data;
          default:  s_rdata <= '0;
        endcase
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
