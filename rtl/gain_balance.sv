// Gain balance: scales one pick-up signal by a programmable factor a so that
// the two pick-ups, which sit at different beta-function values, give
// signals normalised to sqrt(beta). The document gives the working range of the
// factor as 0.5 to 1; the factor here is an unsigned 1.15 fixed-point number
// (0 to just under 2), which covers that range with 15 fractional bits.
// The product is rounded to nearest and saturated to 16 bits.
// Timing: one clock from din to dout.
module gain_balance
  import dspu_pkg::*;
(
  input  logic        clk,
  input  sample_t     din,
  input  logic [15:0] gain,   // unsigned 1.15
  output sample_t     dout
);
  logic signed [47:0] prod;
  always_comb prod = 48'(din) * 48'(signed'({1'b0, gain}));
  always_ff @(posedge clk) dout <= round_sat(prod, 15);
endmodule
