// Per-bunch sign and loop switch. A one-bit table indexed by bunch number
// multiplies each bunch's kick by +1 or -1, so that chosen bunches are
// anti-damped (excited) while the others are damped. loop_on = 0 forces the
// output to zero, opening the loop. Negating -32768 saturates to +32767.
// The table is written from the register bus, one bunch per write, and is
// not cleared by reset (the register file clears it after reset).
// The sign per bunch follows the document; reading the figure's ON/OFF switch
// as the loop switch is this design's choice.
// Timing: two clocks from din/bunch/loop_on to dout (synchronous table read).
module bunch_sign
  import dspu_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic    clk,
  input  logic    loop_on,
  input  sample_t din,
  input  bunch_t  bunch,
  input  logic    wr_en,
  input  bunch_t  wr_addr,
  input  logic    wr_sign,   // 1 = multiply by -1
  output sample_t dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic    sign_tab [DEPTH];
  logic    neg_q, on_q;
  sample_t d_q;

  always_ff @(posedge clk) begin
    if (wr_en) sign_tab[AW'(wr_addr)] <= wr_sign;
    neg_q <= sign_tab[AW'(bunch)];
    d_q   <= din;
    on_q  <= loop_on;
    if (!on_q)   dout <= '0;
    else if (neg_q) dout <= sat16(-48'(d_q));
    else            dout <= d_q;
  end
endmodule
