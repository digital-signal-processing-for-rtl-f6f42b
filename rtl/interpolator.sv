// 2x interpolator, 40.08 MHz to 80.16 MHz. For every new bunch sample x[k]
// (marked by dvalid) it emits first the midpoint (x[k-1]+x[k])/2 and then x[k]
// itself, i.e. a linear interpolator (zero-stuffing followed by the FIR
// 1/2, 1, 1/2). Doubling the rate leaves room for the 80 MHz filters that
// follow to shape the response up to and beyond 20 MHz. The document states
// only that the signal is interpolated to 80.16 MHz; the linear interpolation
// is this design's choice.
// Timing: the cycle after dvalid dout is the midpoint, the cycle after that it
// is x[k]; dvalid is expected every second clock.
module interpolator
  import dspu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t din,
  input  logic    dvalid,
  output sample_t dout
);
  sample_t cur;
  logic signed [16:0] sum;
  always_comb sum = 17'(cur) + 17'(din);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur  <= '0;
      dout <= '0;
    end else if (dvalid) begin
      dout <= sample_t'(sum >>> 1);
      cur  <= din;
    end else begin
      dout <= cur;
    end
  end
endmodule
