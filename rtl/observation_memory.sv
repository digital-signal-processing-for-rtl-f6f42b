// Observation memory. Records eight signals of the loop into a circular
// buffer of 2^18 samples in one bank of external SRAM, at a rate chosen by the
// user from the full bunch rate (40.08 MHz, 6.4 ms of record) down to
// 40.08 MHz / 2^15 = 1.223 kHz (209 s). Before decimation by 2^k each channel
// is averaged over the 2^k samples that make up one recorded sample (a boxcar
// filter), so a slow recording shows the mean beam motion instead of aliases.
// Recording stops on a hardware trigger or a software trigger, after which
// the buffer can be read back sample by sample; arm restarts it.
// Rates, depth and triggers follow the document; the boxcar decimation filter
// is this design's choice. Timing: a recorded sample is written two clocks
// after the last of its input samples; readback as in circ_recorder.
module observation_memory
  import dspu_pkg::*;
#(
  parameter int unsigned ADDR_W   = 18,
  parameter int unsigned READ_LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sample_t           ch [NCH],
  input  logic [3:0]        decim_log2,
  input  logic              arm,
  input  logic              trig_hw,
  input  logic              trig_sw,
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
  logic signed [31:0] acc [NCH];
  sample_t avg [NCH];
  logic [14:0] cnt;
  logic        last, stb;

  always_comb last = (cnt >= 15'((32'd1 << decim_log2) - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      stb <= 1'b0;
      for (int i = 0; i < NCH; i++) begin
        acc[i] <= '0;
        avg[i] <= '0;
      end
    end else begin
      stb <= last;
      cnt <= last ? '0 : cnt + 1'b1;
      for (int i = 0; i < NCH; i++) begin
        if (last) begin
          acc[i] <= '0;
          avg[i] <= sample_t'((acc[i] + 32'(ch[i])) >>> decim_log2);
        end else begin
          acc[i] <= acc[i] + 32'(ch[i]);
        end
      end
    end
  end

  circ_recorder #(.ADDR_W(ADDR_W), .READ_LAT(READ_LAT)) u_rec (
    .clk, .rst_n, .arm, .stop(trig_hw | trig_sw), .wr_stb(stb), .ch(avg),
    .recording, .last_addr, .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .rd_req, .rd_addr, .rd_ch, .rd_data, .rd_valid
  );
endmodule
