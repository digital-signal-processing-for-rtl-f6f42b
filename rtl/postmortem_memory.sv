// Post-mortem memory. Records the same eight signals as the observation
// memory, always at the full 40.08 MHz bunch rate, into a circular buffer of
// 2^18 samples in the second SRAM bank. Only the machine-wide post-mortem
// trigger stops it, so after a beam abort the last 6.4 ms of the loop's
// signals are kept for analysis and can be read back; arm restarts it.
// The samples are registered once before the recorder, so a sample is written
// two clocks after it arrives. Follows the document except the readback
// handshake, which is shared with the observation memory.
module postmortem_memory
  import dspu_pkg::*;
#(
  parameter int unsigned ADDR_W   = 18,
  parameter int unsigned READ_LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sample_t           ch [NCH],
  input  logic              arm,
  input  logic              pm_trig,
  output logic              recording,
  output logic [ADDR_W-1:0] last_addr,
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_we,
  output logic [3:0][35:0]  sram_wdata,
  input  logic [3:0][35:0]  sram_rdata,
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [2:0]        rd_ch,
  output sample_t           rd_data,
  output logic              rd_valid
);
  sample_t ch_q [NCH];
  logic    trig_q;
  always_ff @(posedge clk) begin
    ch_q   <= ch;
    trig_q <= pm_trig;
  end

  circ_recorder #(.ADDR_W(ADDR_W), .READ_LAT(READ_LAT)) u_rec (
    .clk, .rst_n, .arm, .stop(trig_q), .wr_stb(1'b1), .ch(ch_q),
    .recording, .last_addr, .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .rd_req, .rd_addr, .rd_ch, .rd_data, .rd_valid
  );
endmodule
