// Perturbation (excitation) generator. Two banks of 4096 x 16-bit embedded
// memory hold excitation records written from the register bus. While en is
// high the selected bank is played from address 0 to length and round again,
// and the played value is added to the 80.16 MHz loop signal, e.g. to measure
// the step or frequency response of the beam together with the observation
// memory. At the full bunch rate each record entry lasts one bunch period (two
// clocks). With rate_shift = k > 0 an entry lasts 2^k bunch periods and the
// output is interpolated linearly between successive entries,
//   p = m[i] + (m[i+1] - m[i]) * ph / 2^(k+1),  ph = 0 .. 2^(k+1)-1,
// so a slow record gives a smooth excitation instead of a staircase.
// trig restarts the record at address 0 (timing event); raising en does too.
// The memory size, the two banks and the interpolation at reduced rate follow
// the document; the linear interpolator, the looping and the restart rules are
// this design's choices.
// Timing: din to dout is one clock. After a start, the first three clocks
// fetch m[0] and m[1] and add nothing; then entry 0 starts.
module perturbation_gen
  import dspu_pkg::*;
#(
  parameter int unsigned BANKS = 2,
  parameter int unsigned DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        bank,
  input  logic [3:0]  rate_shift,
  input  logic [$clog2(DEPTH)-1:0] length,
  input  logic        trig,
  input  logic        wr_en,
  input  logic [$clog2(BANKS*DEPTH)-1:0] wr_addr,
  input  logic [15:0] wr_data,
  input  sample_t     din,
  output sample_t     dout,
  output logic        running
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned MW = $clog2(BANKS * DEPTH);

  sample_t mem [BANKS*DEPTH];
  sample_t rd_q, cur, nxt;
  logic [AW-1:0] rd_addr;
  logic [1:0]    ld_cnt;
  logic [16:0]   ph, ph_last;
  logic          en_q;
  logic signed [47:0] interp, p;

  function automatic logic [AW-1:0] next_addr(input logic [AW-1:0] a);
    return (a == length) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_q <= mem[MW'({bank, rd_addr})];
  end

  always_comb ph_last = (17'd2 << rate_shift) - 17'd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      ld_cnt  <= '0;
      rd_addr <= '0;
      ph      <= '0;
      cur     <= '0;
      nxt     <= '0;
      en_q    <= 1'b0;
    end else begin
      en_q <= en;
      if (!en) begin
        running <= 1'b0;
        ld_cnt  <= '0;
      end else if (trig || !en_q) begin
        running <= 1'b0;
        ld_cnt  <= 2'd3;
        rd_addr <= '0;
      end else if (ld_cnt != 0) begin
        ld_cnt <= ld_cnt - 1'b1;
        if (ld_cnt == 2'd2) cur <= rd_q;
        if (ld_cnt == 2'd1) begin
          nxt     <= rd_q;
          running <= 1'b1;
          ph      <= '0;
        end
        if (ld_cnt != 2'd1) rd_addr <= next_addr(rd_addr);
      end else if (running) begin
        if (ph == ph_last) begin
          ph      <= '0;
          cur     <= nxt;
          nxt     <= rd_q;
          rd_addr <= next_addr(rd_addr);
        end else begin
          ph <= ph + 1'b1;
        end
      end
    end
  end

  always_comb begin
    interp = ((48'(nxt) - 48'(cur)) * 48'(signed'({1'b0, ph}))) >>> (rate_shift + 4'd1);
    p = (rate_shift == 0) ? 48'(cur) : 48'(cur) + interp;
  end

  always_ff @(posedge clk) dout <= sat16(48'(din) + (running ? p : 48'sd0));
endmodule
