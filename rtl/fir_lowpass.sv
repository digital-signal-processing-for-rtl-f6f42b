// Linear-phase FIR low-pass that sets the loop bandwidth (cut-off near
// 20 MHz at the 80.16 MHz rate). A low-pass with symmetric taps has a constant
// group delay, so it shapes the roll-off without disturbing the loop phase
// that the earlier stages set. The symmetry is used to halve the multipliers:
// samples i and TAPS-1-i are added first and share one coefficient,
//   y[n] = sum_{i<M} h[i]*(x[n-i] + x[n-(TAPS-1-i)]) + h[M]*x[n-M],
//   M = (TAPS-1)/2, TAPS odd, h signed 2.14.
// The M+1 unique taps are loaded at run time; after reset h[M] = 1.0, a pure
// delay of M samples. The document names an FIR low-pass of about 20 MHz; tap
// count, symmetric structure and format are this design's choices.
// Timing: dout(t) uses din(t-2...); the pass-through delay is M+2 clocks.
module fir_lowpass
  import dspu_pkg::*;
#(
  parameter int unsigned TAPS      = 15,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          coef_we,
  input  logic [$clog2((TAPS+1)/2)-1:0] coef_addr,
  input  logic [15:0]                   coef_data,
  input  sample_t                       din,
  output sample_t                       dout
);
  localparam int unsigned M = (TAPS - 1) / 2;
  sample_t x [TAPS];
  logic signed [15:0] h [M+1];
  logic signed [47:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= M; i++) h[i] <= (i == M) ? 16'sh4000 : '0;
    end else if (coef_we && 32'(coef_addr) <= M) begin
      h[coef_addr] <= signed'(coef_data);
    end
  end

  always_ff @(posedge clk) begin
    x[0] <= din;
    for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
  end

  always_comb begin
    acc = 48'(x[M]) * 48'(h[M]);
    for (int i = 0; i < M; i++) acc += (48'(x[i]) + 48'(x[TAPS-1-i])) * 48'(h[i]);
  end

  always_ff @(posedge clk) dout <= round_sat(acc, COEF_FRAC);
endmodule
