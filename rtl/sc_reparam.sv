// sc_reparam: reparameterisation step of the ShiftCNN VAE,
// z = mean + exp(logvar / 2) * eps, with eps supplied from outside (the
// host computes the random numbers and sends them with the input pixels).
//
// How: logvar is halved by an arithmetic shift and looked up in the
// exponential table (sc_lut), the result is multiplied by eps (a true
// multiplier: eps is data, not a shift weight), shifted back to Q10.10 and
// added to the mean with saturation.
//
// Timing (own choice): in_valid -> out_valid 3 clocks (table, product,
// sum), one value per clock.
module sc_reparam
  import sc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  q_t   mean,
  input  q_t   logvar,
  input  q_t   eps,
  output logic out_valid,
  output q_t   z
);
  q_t   sd, mean_q, eps_q, mean_q2;
  logic signed [2*XW-1:0] p;
  logic [2:0] v;

  sc_lut u_exp (.clk, .sel(1'b0), .x(logvar >>> 1), .y(sd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[1:0], in_valid};
  end
  assign out_valid = v[2];

  always_ff @(posedge clk) begin
    mean_q  <= mean;
    eps_q   <= eps;
    p       <= sd * eps_q;
    mean_q2 <= mean_q;
    z       <= qsat(64'(mean_q2) + 64'(p >>> FRAC));
  end
endmodule
