// Pick-up stream resynchroniser ("Sync" stage).
// Each beam position front-end sends one 16-bit word per bunch slot on its own
// serial link; the receiving transceiver hands the FPGA the words on its own
// recovered clock, with a flag on the word of bunch 1 (the revolution marker of
// that pick-up). This block writes every word into a dual-clock memory at the
// address of its bunch index, counted from the pick-up's own marker, and reads
// the memory in the 40.08 MHz bunch clock domain at the bunch index counted
// from the common revolution marker. Both pick-ups therefore leave this stage
// aligned bunch by bunch, whatever their cable and link latency.
// Memory depth DEPTH must cover one turn (TURN slots); counters restart at 0 on
// a marker and wrap at TURN-1 when no marker comes.
// Timing: dout and bunch are valid 2 clk cycles after the read counter reaches
// a bunch (registered memory read, then output register). Whether a word is
// read in the same turn it was written depends on the relative phase of the
// two markers; the constant difference is absorbed by the turn delay later on.
// The memory-based resynchronisation follows the document; the marker flag and
// the counter scheme are this design's choice.
module bunch_sync
  import dspu_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned TURN  = 3564
) (
  // pick-up link side
  input  logic    rx_clk,
  input  logic    rx_rst_n,
  input  sample_t rx_data,
  input  logic    rx_frev,
  // bunch clock side
  input  logic    clk,
  input  logic    rst_n,
  input  logic    frev,
  output sample_t dout,
  output bunch_t  bunch
);
  localparam int unsigned AW = $clog2(DEPTH);

  sample_t mem [DEPTH];
  logic [AW-1:0] wcnt, waddr, rcnt;
  logic [AW-1:0] rcnt_q;
  sample_t rd_q;

  // write side: the marker word is bunch 0
  always_comb begin
    if (rx_frev) waddr = '0;
    else waddr = wcnt;
  end

  always_ff @(posedge rx_clk) begin
    if (!rx_rst_n) wcnt <= '0;
    else if (waddr == AW'(TURN - 1)) wcnt <= '0;
    else wcnt <= waddr + 1'b1;
  end

  always_ff @(posedge rx_clk) mem[waddr] <= rx_data;

  // read side
  logic [AW-1:0] raddr;
  always_comb begin
    if (frev) raddr = '0;
    else raddr = rcnt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rcnt <= '0;
    else if (raddr == AW'(TURN - 1)) rcnt <= '0;
    else rcnt <= raddr + 1'b1;
  end

  always_ff @(posedge clk) begin
    rd_q   <= mem[raddr];
    rcnt_q <= raddr;
    dout   <= rd_q;
    bunch  <= bunch_t'(rcnt_q);
  end
endmodule
