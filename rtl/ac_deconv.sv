// ac_deconv: transposed convolution (3x3 kernel, stride 2) of the angle
// completion decoder, done by scattering.
//
// For every input cell A at (row, col) of the 16x16 map, the nine products
// A*k(dy,dx) are formed (the "create kernel" and "multiply kernel" steps)
// and added into the 32x32 accumulation array at (2*row+dy, 2*col+dx); the
// next cell to the right lands two columns further on, overlapping the
// previous one in one column, where the values add up. Positions 32 (the
// 33rd row/column of the full result) are dropped. `clear` zeroes the
// array before an image.
//
// Timing: cell in (a_valid) -> kernel/operand register 1 clock -> products
// 1 clock -> accumulate 1 clock; one cell per clock. img is the array
// itself, row-major, pixel (r,c) in img[r][c].
module ac_deconv
  import ac_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                a_valid,
  input  fix_t                a,
  input  logic [3:0]          row,
  input  logic [3:0]          col,
  input  logic [KS*KS*DW-1:0] kernel,
  output fix_t                img [OUT_DIM][OUT_DIM]
);
  // stage 1: kernel creation (split into taps) and operand register
  fix_t       k_q [KS*KS];
  fix_t       a_q;
  logic [3:0] r_q, c_q, r_q2, c_q2;
  logic       v_q, v_q2;
  // stage 2: products
  fix_t       prod [KS*KS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= 1'b0;
      v_q2 <= 1'b0;
    end else begin
      v_q  <= a_valid && !clear;
      v_q2 <= v_q && !clear;
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < KS*KS; t++) k_q[t] <= fix_t'(kernel[DW*t +: DW]);
    a_q  <= a;
    r_q  <= row;
    c_q  <= col;
    for (int t = 0; t < KS*KS; t++) prod[t] <= fxmul(a_q, k_q[t]);
    r_q2 <= r_q;
    c_q2 <= c_q;
  end

  // stage 3: scatter-accumulate
  for (genvar r = 0; r < OUT_DIM; r++) begin : g_r
    for (genvar c = 0; c < OUT_DIM; c++) begin : g_c
      // the one tap (dy,dx), if any, of the current cell that lands here
      logic       hit;
      logic [3:0] tap;
      always_comb begin
        hit = 1'b0;
        tap = '0;
        for (int dy = 0; dy < KS; dy++)
          for (int dx = 0; dx < KS; dx++)
            if ((STRIDE*int'(r_q2) + dy == r) && (STRIDE*int'(c_q2) + dx == c)) begin
              hit = 1'b1;
              tap = 4'(KS*dy + dx);
            end
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)             img[r][c] <= '0;
        else if (clear)         img[r][c] <= '0;
        else if (v_q2 && hit)   img[r][c] <= sat16(longint'(img[r][c]) + longint'(prod[tap]));
      end
    end
  end
endmodule
