// Reset synchroniser: asserts rst_out_n at once when rst_in_n falls and
// releases it two clocks after rst_in_n rises, in the clock domain of clk.
// One per clock domain of the processor (two link clocks, the bunch clock and
// the delayed 80 MHz clock).
module reset_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic r1;
  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      r1 <= 1'b0;
      rst_out_n <= 1'b0;
    end else begin
      r1 <= 1'b1;
      rst_out_n <= r1;
    end
  end
endmodule
