// Coarse loop delay ("Function Delay"). The kick must reach a bunch exactly
// when it passes the kicker one turn after its position was measured, so the
// signal is delayed by the time of flight from pick-up to kicker plus one turn,
// less the electronic and cable delays. This block provides the programmable
// part in whole bunch periods, up to DEPTH-1 (a full turn fits), from the
// delay function. It is a circular buffer: the write pointer runs freely and
// the read address is the write pointer minus the delay. The sub-bunch part is
// made outside by clocking the following stages with a delayed clock.
// The words are WIDTH bits (a 16-bit sample by default); the top uses a
// second, 12-bit copy to carry the bunch number alongside the samples.
// Timing: dout(t) = din(t - delay - 1) clocks (registered read and output);
// delay >= 1 (0 acts as a delay of DEPTH). Changing delay takes effect on the next clock.
module turn_delay
  import dspu_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = DATA_W   // word width; the top also delays bunch numbers
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] buf_mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [WIDTH-1:0] rd_q;

  always_comb rp = wp - delay;

  always_ff @(posedge clk) begin
    if (!rst_n) wp <= '0;
    else wp <= wp + 1'b1;
  end

  always_ff @(posedge clk) begin
    buf_mem[wp] <= din;
    rd_q <= buf_mem[rp];
    dout <= rd_q;
  end
endmodule
