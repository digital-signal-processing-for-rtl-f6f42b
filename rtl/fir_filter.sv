// Direct-form FIR filter with programmable coefficients, used at 80.16 MHz as
// the 32-tap phase compensation filter of the power amplifier and kicker.
// The amplifier's low-pass response turns the phase by up to -90 degrees over
// the band; the filter's taps are chosen so that amplifier plus filter have a
// constant group delay. The taps themselves are loaded at run time
// (coef_we/coef_addr/coef_data), so they are not part of the RTL; after reset
// the filter is a pass-through (tap 0 = 1.0, the rest 0).
//   y[n] = sum_{i=0}^{TAPS-1} c[i] * x[n-i],  c[i] signed with COEF_FRAC
//   fractional bits (2.14 by default); y rounded and saturated to 16 bits.
// The direct form and the 32 taps follow the document; coefficient format and
// reset values are this design's choices.
// Timing: dout(t) = y computed from din(t-2), din(t-3), ...: one clock into
// the delay line, one for the registered sum.
module fir_filter
  import dspu_pkg::*;
#(
  parameter int unsigned TAPS      = 32,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  logic [15:0]             coef_data,
  input  sample_t                 din,
  output sample_t                 dout
);
  sample_t x [TAPS];
  logic signed [15:0] c [TAPS];
  logic signed [47:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) c[i] <= (i == 0) ? 16'sh4000 : '0;
    end else if (coef_we) begin
      c[coef_addr] <= signed'(coef_data);
    end
  end

  always_ff @(posedge clk) begin
    x[0] <= din;
    for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc += 48'(x[i]) * 48'(c[i]);
  end

  always_ff @(posedge clk) dout <= round_sat(acc, COEF_FRAC);
endmodule
