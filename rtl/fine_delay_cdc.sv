// Fine-delay domain change. The loop phase is set to a fraction of a bunch
// period by running the 80 MHz part of the chain on a copy of the 80.16 MHz
// clock that an external programmable delay line has shifted (10 ps steps);
// this block hands the 40.08 MHz samples over to that delayed clock domain.
// Since the delay is arbitrary, the two clocks have an unknown but fixed phase.
// The 40 MHz side writes alternately into two holding registers and flips a
// toggle; the 80 MHz side passes the toggle through two flip-flops and, when it
// sees it change, copies the register written last. That register is then
// left alone for two bunch periods, so it is stable when copied.
// The use of a delayed clock for the later stages follows the document; the
// ping-pong toggle handshake is this design's choice.
// Timing: dvalid pulses for one clk80d cycle per 40 MHz sample, 2 to 3 clk80d
// cycles after the clk40 edge that stored it; dout holds the sample until the
// next pulse.
module fine_delay_cdc
  import dspu_pkg::*;
(
  input  logic    clk40,
  input  logic    rst40_n,
  input  sample_t din,
  input  logic    clk80d,
  input  logic    rst80_n,
  output sample_t dout,
  output logic    dvalid
);
  sample_t hold [2];
  logic wsel;
  logic s1, s2, s3;

  always_ff @(posedge clk40) begin
    if (!rst40_n) wsel <= 1'b0;
    else wsel <= ~wsel;
    hold[wsel] <= din;
  end

  always_ff @(posedge clk80d) begin
    if (!rst80_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
      dvalid <= 1'b0;
      dout <= '0;
    end else begin
      s1 <= wsel;
      s2 <= s1;
      s3 <= s2;
      dvalid <= (s2 != s3);
      // after a flip to s2 the newest sample sits in hold[~s2]
      if (s2 != s3) dout <= hold[~s2];
    end
  end
endmodule
