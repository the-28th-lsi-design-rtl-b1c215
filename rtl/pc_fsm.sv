// pc_fsm: State Machine of the point cloud generator.
//
// After `start` it has the input control gather the latent vector, then runs
// the decoder and the output control once for each of the four quarters of
// the output (part 0..3), and finally raises `end_flag`, which stays high
// until the next `start`. The division into quarters and the sequencing
// are the design's; the exact states and handshakes are an own choice:
//   IDLE -> LOAD (wait in_ready) -> DEC (wait dec_done) -> OUT (wait
//   out_done) -> DEC of the next part ... -> IDLE with end_flag set.
module pc_fsm
  import pc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       in_go,
  input  logic       in_ready,
  output logic       dec_start,
  output logic [1:0] part,
  input  logic       dec_done,
  output logic       out_load,
  input  logic       out_done,
  output logic       busy,
  output logic       end_flag
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DEC, S_OUT} state_t;
  state_t state;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      part      <= '0;
      in_go     <= 1'b0;
      dec_start <= 1'b0;
      out_load  <= 1'b0;
      end_flag  <= 1'b0;
    end else begin
      in_go     <= 1'b0;
      dec_start <= 1'b0;
      out_load  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_LOAD;
          part     <= '0;
          end_flag <= 1'b0;
          in_go    <= 1'b1;
        end
        S_LOAD: if (in_ready) begin
          state     <= S_DEC;
          dec_start <= 1'b1;
        end
        S_DEC: if (dec_done) begin
          state    <= S_OUT;
          out_load <= 1'b1;
        end
        S_OUT: if (out_done) begin
          if (part == 2'(N_PARTS-1)) begin
            state    <= S_IDLE;
            end_flag <= 1'b1;
          end else begin
            state     <= S_DEC;
            part      <= part + 1'b1;
            dec_start <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
