// Betatron phase shifter: an optional 3-turn FIR (a "Hilbert" filter) on the
// signal of one pick-up. For every bunch it combines that bunch's samples of
// the present turn and of the two turns before,
//   y[n] = c0*x[n] + c1*x[n-T] + c2*x[n-2T],
// which at the betatron frequency acts as a phase shift set by the taps. The
// two older samples come from two memories indexed by bunch number. Taps are
// signed 2.14 numbers; the sum is rounded and saturated to 16 bits.
// hilbert_en = 0 bypasses the filter with the same latency. After the filter
// sits the pick-up ON/OFF switch: pu_en = 0 forces the output to zero so
// the loop can run on the other pick-up alone.
// The 3-turn length, the optional use and the switch follow the document; the
// tap format and the reading of the switch are this design's choices.
// Timing: two clocks from din/bunch to dout; the taps and enables are taken
// with the sample they apply to; the history is written whether
// the filter is used or not.
module phase_shifter
  import dspu_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic            clk,
  input  logic            hilbert_en,
  input  logic            pu_en,
  input  logic [2:0][15:0] coef,     // [0] turn n, [1] turn n-1, [2] turn n-2
  input  sample_t         din,
  input  bunch_t          bunch,
  output sample_t         dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  sample_t hist1 [DEPTH];   // one turn back
  sample_t hist2 [DEPTH];   // two turns back
  sample_t x0_q, x1_q, x2_q;
  bunch_t  bunch_q;
  logic    hen_q, pen_q;
  logic [2:0][15:0] c_q;
  logic signed [47:0] acc;
  sample_t y;

  always_ff @(posedge clk) begin
    x1_q    <= hist1[AW'(bunch)];
    x2_q    <= hist2[AW'(bunch)];
    x0_q    <= din;
    bunch_q <= bunch;
    hen_q   <= hilbert_en;
    pen_q   <= pu_en;
    c_q     <= coef;
  end

  always_comb begin
    acc = 48'(x0_q) * 48'(signed'(c_q[0]))
        + 48'(x1_q) * 48'(signed'(c_q[1]))
        + 48'(x2_q) * 48'(signed'(c_q[2]));
    y = hen_q ? round_sat(acc, 14) : x0_q;
  end

  always_ff @(posedge clk) begin
    hist1[AW'(bunch_q)] <= x0_q;
    hist2[AW'(bunch_q)] <= x1_q;
    dout <= pen_q ? y : '0;
  end
endmodule
