// Closed-orbit notch filter. The closed orbit is the part of each bunch's
// position that is the same on every turn; the betatron oscillation to be
// damped changes sign and size from turn to turn. Subtracting from each
// sample the same bunch's sample one turn earlier removes everything at the
// revolution harmonics (DC included) and keeps the betatron lines:
//   y[n] = (x[n] - x[n - T]) / 2,  T = one turn.
// The halving keeps the result inside 16 bits. The one-turn history is a
// memory indexed by the bunch number, so T is whatever the revolution marker
// makes it. en travels with its sample. When en is low the sample passes unchanged with the same latency.
// The document says only that a digital notch filter removes the closed orbit
// and can be switched on and off; the one-turn comb is this design's choice.
// Timing: two clocks from din/bunch to dout (synchronous memory read, then
// the registered difference). The history memory is written at
// every sample whether the filter is on or not.
module notch_filter
  import dspu_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic    clk,
  input  logic    en,
  input  sample_t din,
  input  bunch_t  bunch,
  output sample_t dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  sample_t hist [DEPTH];
  sample_t prev_q, din_q;
  logic    en_q;
  bunch_t  bunch_q;
  logic signed [16:0] diff;

  // stage 1: read last turn's sample of this bunch (synchronous read)
  always_ff @(posedge clk) begin
    prev_q  <= hist[AW'(bunch)];
    din_q   <= din;
    bunch_q <= bunch;
    en_q    <= en;
  end

  always_comb diff = 17'(din_q) - 17'(prev_q);

  // stage 2: store this turn's sample, output the difference
  always_ff @(posedge clk) begin
    hist[AW'(bunch_q)] <= din_q;
    if (en_q) dout <= sample_t'(diff >>> 1);
    else    dout <= din_q;
  end
endmodule
