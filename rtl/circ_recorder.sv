// Circular recorder for one bank of external synchronous SRAM, shared by the
// observation and post-mortem memories. Each bank is four 36-bit chips on a
// common address bus; every chip stores two 16-bit channels (bits 15:0 and
// 31:16), so one write stores all eight channels of one sample. While armed,
// every wr_stb writes the channels at the write pointer and advances it,
// wrapping at 2^ADDR_W; a stop pulse freezes the recording and last_addr then
// holds the address of the newest sample. arm restarts recording.
// Readback (rd_req with rd_addr and rd_ch) is served in the first clock with no
// write; rd_data follows with rd_valid READ_LAT+1 clocks later.
// The circular recording, stop by trigger and readback follow the document;
// the channel packing and the handshakes are this design's choices.
module circ_recorder
  import dspu_pkg::*;
#(
  parameter int unsigned ADDR_W   = 18,
  parameter int unsigned READ_LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arm,
  input  logic              stop,
  input  logic              wr_stb,
  input  sample_t           ch [NCH],
  output logic              recording,
  output logic [ADDR_W-1:0] last_addr,
  // SRAM bank
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_we,
  output logic [3:0][35:0]  sram_wdata,
  input  logic [3:0][35:0]  sram_rdata,
  // readback
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [2:0]        rd_ch,
  output sample_t           rd_data,
  output logic              rd_valid
);
  logic [ADDR_W-1:0] wp, rd_addr_q;
  logic [2:0]        rd_ch_q;
  logic              rd_pend, do_wr, do_rd;
  logic [READ_LAT:0] v_pipe;
  logic [2:0]        c_pipe [READ_LAT+1];

  always_comb begin
    do_wr = recording && wr_stb;
    do_rd = rd_pend && !do_wr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      recording <= 1'b0;
      wp        <= '0;
      last_addr <= '0;
      rd_pend   <= 1'b0;
      rd_addr_q <= '0;
      rd_ch_q   <= '0;
      sram_we   <= 1'b0;
      sram_addr <= '0;
      sram_wdata <= '0;
      v_pipe    <= '0;
    end else begin
      if (stop && recording) recording <= 1'b0;
      else if (arm) recording <= 1'b1;
      if (do_wr) begin
        wp        <= wp + 1'b1;
        last_addr <= wp;
      end
      if (rd_req) begin
        rd_pend   <= 1'b1;
        rd_addr_q <= rd_addr;
        rd_ch_q   <= rd_ch;
      end else if (do_rd) begin
        rd_pend <= 1'b0;
      end
      sram_we <= do_wr;
      if (do_wr) begin
        sram_addr <= wp;
        for (int k = 0; k < 4; k++) sram_wdata[k] <= {4'h0, ch[2*k+1], ch[2*k]};
      end else if (do_rd) begin
        sram_addr <= rd_addr_q;
      end
      v_pipe <= {v_pipe[READ_LAT-1:0], do_rd};
    end
  end

  always_ff @(posedge clk) begin
    c_pipe[0] <= rd_ch_q;
    for (int i = 1; i <= READ_LAT; i++) c_pipe[i] <= c_pipe[i-1];
  end

  // the SRAM returns the word READ_LAT clocks after the address register
  logic [2:0] cr;
  always_comb cr = c_pipe[READ_LAT];
  always_ff @(posedge clk) begin
    rd_valid <= v_pipe[READ_LAT];
    rd_data  <= cr[0] ? sample_t'(sram_rdata[cr[2:1]][31:16])
                      : sample_t'(sram_rdata[cr[2:1]][15:0]);
  end
endmodule
