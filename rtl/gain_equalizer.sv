// Dynamically changing gain equaliser. A direct-form FIR whose coefficients
// come from one of NSETS stored sets; the set in use is chosen on every clock
// by sel, driven by the timing system, so the gain-versus-frequency shape can
// be switched between set-ups, e.g. a high-gain wide-band shape for injection
// damping and a gentler one for instability control during physics. All sets
// are writable from the register bus at any time (set*TAPS + tap addressing).
// After reset every set is a pass-through (tap 0 = 1.0).
// The document gives the function (FIRs that optimise the gain, changed from
// VME and timing); the tap count, the number of sets and the coefficient
// format (signed 2.14) are this design's choices.
// Timing: dout(t) uses din(t-2...) and the set selected at t-1.
module gain_equalizer
  import dspu_pkg::*;
#(
  parameter int unsigned TAPS  = 16,
  parameter int unsigned NSETS = 3,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        sel,
  input  logic              coef_we,
  input  logic [5:0]        coef_addr,   // set * TAPS + tap
  input  logic [15:0]       coef_data,
  input  sample_t           din,
  output sample_t           dout
);
  localparam int unsigned TW = $clog2(TAPS);
  sample_t x [TAPS];
  logic signed [15:0] c [NSETS][TAPS];
  logic [1:0] sel_q;
  logic signed [47:0] acc;
  logic [5:0] wset;

  always_comb wset = coef_addr >> TW;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++)
        for (int i = 0; i < TAPS; i++) c[s][i] <= (i == 0) ? 16'sh4000 : '0;
      sel_q <= '0;
    end else begin
      if (coef_we && wset < 6'(NSETS)) c[wset[1:0]][coef_addr[TW-1:0]] <= signed'(coef_data);
      sel_q <= (sel < 2'(NSETS)) ? sel : '0;
    end
  end

  always_ff @(posedge clk) begin
    x[0] <= din;
    for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc += 48'(x[i]) * 48'(c[sel_q][i]);
  end

  always_ff @(posedge clk) dout <= round_sat(acc, COEF_FRAC);
endmodule
