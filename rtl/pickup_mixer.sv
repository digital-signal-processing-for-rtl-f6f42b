// Pick-up mixer ("Function Phase"): forms the kick signal from the two
// pick-up signals, y = b1*x1 + b2*x2. The coefficients come from the phase
// function and may change every bunch; they are computed outside the card from
// the betatron phase advances of pick-ups and kicker and the fractional tune so
// that the combined vector has the phase the loop needs and unit length. Since
// those coefficients can exceed 1 in magnitude, they are signed 3.13 numbers
// here (range -4 to just under 4), a format of this design's choosing.
// Timing: two clocks (registered products, then registered rounded and
// saturated sum).
module pickup_mixer
  import dspu_pkg::*;
#(
  parameter int unsigned COEF_FRAC = 13
) (
  input  logic        clk,
  input  sample_t     x1,
  input  sample_t     x2,
  input  logic [15:0] b1,
  input  logic [15:0] b2,
  output sample_t     y
);
  logic signed [31:0] p1, p2;
  always_ff @(posedge clk) begin
    p1 <= x1 * signed'(b1);
    p2 <= x2 * signed'(b2);
    y  <= round_sat(48'(p1) + 48'(p2), COEF_FRAC);
  end
endmodule
