// sc_dense: dense (matrix multiplication) layer engine of the ShiftCNN VAE.
//
// The layer y[o] = act(sum_i x[i] * W[o][i] + b[o]) is computed by address
// calculation over block memories, one product per clock: an FSM steps the
// input index i and the weight address o*N_IN + i, the two-term shift
// multiplier (sc_shift_mul) replaces the multiplication, the products are
// summed, the bias is added, and the result (optionally through ReLU) is
// written to the output memory at address o. Defaults N_IN = 169,
// N_OUT = 100 are the first encoder dense layer (flattened 13x13 map to
// 100 neurons).
//
// Memories (own choice of ports): the input memory is written through
// x_we/x_addr/x_data, the weight memory (20-bit words, two 10-bit shift
// terms) and bias memory through w_we/w_addr/w_data and b_we/b_addr/b_data
// (the design loads them from a coefficient file), and the output memory is
// read through y_addr/y_data (one-clock read).
//
// Timing: the clock edge that samples `start` (ignored while busy) is
// followed by N_OUT * (N_IN + 3) clock edges, the last of which raises the
// one-clock `done` pulse: per output N_IN issue clocks, memory read and
// shift multiply (2), write (1); 17,200 clocks at the defaults. The sum is kept in 40 bits and
// saturated to Q10.10 when written.
module sc_dense
  import sc_pkg::*;
#(
  parameter int N_IN  = 169,
  parameter int N_OUT = 100
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             x_we,
  input  logic [$clog2(N_IN)-1:0]          x_addr,
  input  q_t                               x_data,
  input  logic                             w_we,
  input  logic [$clog2(N_IN*N_OUT)-1:0]    w_addr,
  input  logic [2*TW-1:0]                  w_data,
  input  logic                             b_we,
  input  logic [$clog2(N_OUT)-1:0]         b_addr,
  input  q_t                               b_data,
  input  logic                             relu_en,
  input  logic                             start,
  output logic                             busy,
  output logic                             done,
  input  logic [$clog2(N_OUT)-1:0]         y_addr,
  output q_t                               y_data
);
  localparam int IW = $clog2(N_IN);
  localparam int OW = $clog2(N_OUT);
  localparam int WW = $clog2(N_IN*N_OUT);

  q_t              x_mem [N_IN];
  logic [2*TW-1:0] w_mem [N_IN*N_OUT];
  q_t              b_mem [N_OUT];
  q_t              y_mem [N_OUT];

  // ---- control ------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_WRITE} state_t;
  state_t         state;
  logic [IW-1:0]  i;
  logic [OW-1:0]  o;
  logic [WW-1:0]  wa;
  logic           v1, v2;            // read data valid, product valid
  logic           first1, first2;    // first product of an output

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i <= '0; o <= '0; wa <= '0;
      v1 <= 1'b0; v2 <= 1'b0; first1 <= 1'b0; first2 <= 1'b0;
      done <= 1'b0;
    end else begin
      done   <= 1'b0;
      v1     <= (state == S_ISSUE);
      first1 <= (state == S_ISSUE) && (i == '0);
      v2     <= v1;
      first2 <= first1;
      case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          i <= '0; o <= '0; wa <= '0;
        end
        S_ISSUE: begin
          wa <= wa + 1'b1;
          if (i == IW'(N_IN - 1)) begin
            i     <= '0;
            state <= S_WAIT;
          end else i <= i + 1'b1;
        end
        S_WAIT: if (!v1 && v2) state <= S_WRITE;   // last product now summed
        S_WRITE: begin
          if (o == OW'(N_OUT - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            o     <= o + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  assign busy = (state != S_IDLE);

  // ---- datapath -------------------------------------------------------------
  q_t              x_q;
  logic [2*TW-1:0] w_q;
  q_t              prod, b_q;
  logic signed [39:0] acc;

  sc_shift_mul u_mul (.clk, .x(x_q), .w(w_q), .y(prod));

  always_ff @(posedge clk) begin
    if (x_we) x_mem[x_addr] <= x_data;
    if (w_we) w_mem[w_addr] <= w_data;
    if (b_we) b_mem[b_addr] <= b_data;
    x_q <= x_mem[i];
    w_q <= w_mem[wa];
    b_q <= b_mem[o];
    y_data <= y_mem[y_addr];
    if (v2) acc <= (first2 ? 40'sd0 : acc) + 40'(prod);
    if (state == S_WRITE) begin
      automatic q_t s = qsat(64'(acc) + 64'(b_q));
      y_mem[o] <= (relu_en && s < 0) ? '0 : s;
    end
  end
endmodule
