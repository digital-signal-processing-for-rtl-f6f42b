// DAC word formatter. The 16-bit loop signal is rounded to the 14 bits of the
// 80.16 MHz DAC, saturated so that a large value clips rather than wraps, and
// converted to offset binary (code 8192 = zero output) in a register that
// drives the DAC pins. The overall loop gain is set outside, on the DAC's
// reference voltage. The 14-bit width and the clock follow the document; the
// offset-binary code is this design's choice.
// Timing: one clock.
module dac_interface
  import dspu_pkg::*;
(
  input  logic        clk,
  input  sample_t     din,
  output logic [13:0] dac_data
);
  logic signed [16:0] r;
  logic signed [13:0] s;
  always_comb begin
    r = (17'(din) + 17'sd2) >>> 2;
    if (r > 17'sd8191) s = 14'sd8191;
    else if (r < -17'sd8192) s = -14'sd8192;
    else s = r[13:0];
  end
  always_ff @(posedge clk) dac_data <= {~s[13], s[12:0]};
endmodule
