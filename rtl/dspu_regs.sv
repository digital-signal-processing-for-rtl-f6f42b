// Register file of the signal processor, behind a simple synchronous 16-bit
// register bus (one-clock write and read strobes, read data the clock after
// bus_rd) that stands in for the card's VME slave. It holds every setting of
// the 40.08 MHz chain (dspu_cfg_t), issues command pulses, writes the
// per-bunch sign table, and gives access to the diagnostic memories' readback.
// Writes meant for the 80.16 MHz (delayed clock) domain - FIR coefficients,
// the perturbation memory and the perturbation restart - are held in a
// register and announced by a toggle that the clk80d side synchronises in two
// flip-flops; successive such writes must be at least 4 clk cycles apart (checked by
// the assertion a_w80_gap).
// After reset the block spends DEPTH clocks clearing the sign table (all
// bunches +1); bus writes to the table are ignored meanwhile.
// Register map (word addresses), this design's own:
//   0x0000 CTRL  b0 notch1 b1 notch2 b2 hilb1 b3 hilb2 b4 pu1 b5 pu2
//               b6 loop_on b7 pert_on b8 pert_bank
//   0x0001/2 a1/a2 (unsigned 1.15)   0x0003-5 PU1 taps, 0x0006-8 PU2 taps
//   0x0009 observation decimation k  0x000A perturbation rate k
//   0x000B perturbation last address
//   0x000C CMD (write 1s) b0 obs arm b1 obs soft trigger b2 pm arm b3 pert restart
//   0x000D STATUS b0 obs recording b1 pm recording b2 obs data ready b3 pm data ready b4 clearing
//   0x0010 obs readback address 15:0; 0x0011 b3:0 address bits from 16 up
//          (MEM_AW-16 of them are used), b6:4 channel, writing 0x0011 starts
//          the read; 0x0012 read data; 0x0013/14 last address (low/high)
//   0x0018-0x001C the same for the post-mortem memory
//   0x0100+tap phase FIR, 0x0200+set*16+tap gain equaliser, 0x0300+k low-pass
//   0x1000+bunch sign (b0: 1 = -1)      0x2000+bank*4096+addr perturbation memory
module dspu_regs
  import dspu_pkg::*;
#(
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned MEM_AW = 18     // diagnostic memory address width, 17..20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [15:0] bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output dspu_cfg_t   cfg,
  // command pulses
  output logic        obs_arm,
  output logic        obs_sw_trig,
  output logic        pm_arm,
  // sign table write
  output logic        sign_we,
  output bunch_t      sign_addr,
  output logic        sign_val,
  // diagnostic readback
  input  logic        obs_recording,
  input  logic [MEM_AW-1:0] obs_last,
  output logic        obs_rd_req,
  output logic [MEM_AW-1:0] obs_rd_addr,
  output logic [2:0]  obs_rd_ch,
  input  sample_t     obs_rd_data,
  input  logic        obs_rd_valid,
  input  logic        pm_recording,
  input  logic [MEM_AW-1:0] pm_last,
  output logic        pm_rd_req,
  output logic [MEM_AW-1:0] pm_rd_addr,
  output logic [2:0]  pm_rd_ch,
  input  sample_t     pm_rd_data,
  input  logic        pm_rd_valid,
  // writes for the clk80d domain
  input  logic        clk80d,
  input  logic        rst80_n,
  output logic        w80_we,
  output logic [15:0] w80_addr,
  output logic [15:0] w80_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [19:0] obs_last_w, pm_last_w;
  assign obs_last_w = 20'(obs_last);
  assign pm_last_w  = 20'(pm_last);
  logic [AW-1:0] clr_cnt;
  logic          clearing;
  logic [15:0]   obs_ra_lo, pm_ra_lo;
  sample_t       obs_dat, pm_dat;
  logic          obs_rdy, pm_rdy;
  logic          is80;
  logic [15:0]   x_addr, x_data;
  logic          x_tog;

  // addresses served in the clk80d domain
  always_comb is80 = (bus_addr[15:8] inside {8'h01, 8'h02, 8'h03})
                   || (bus_addr[15:13] == 3'b001)
                   || (bus_addr == 16'h000C && bus_wdata[3]);

  // bus rule: a write for the clk80d domain must not overtake the previous one
  logic [2:0] since80;
  always_ff @(posedge clk) begin
    if (!rst_n)                since80 <= 3'd7;
    else if (bus_wr && is80)   since80 <= 3'd0;
    else if (since80 != 3'd7)  since80 <= since80 + 3'd1;
  end
  a_w80_gap: assert property (@(posedge clk) disable iff (!rst_n)
                              bus_wr && is80 |-> since80 >= 3'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg         <= '0;
      cfg.a1      <= 16'h8000;
      cfg.a2      <= 16'h8000;
      cfg.h1[0]   <= 16'h4000;
      cfg.h2[0]   <= 16'h4000;
      cfg.pu1_on  <= 1'b1;
      cfg.pu2_on  <= 1'b1;
      cfg.pert_len <= 12'hFFF;
      obs_arm     <= 1'b0;
      obs_sw_trig <= 1'b0;
      pm_arm      <= 1'b0;
      obs_rd_req  <= 1'b0;
      pm_rd_req   <= 1'b0;
      obs_ra_lo   <= '0;
      pm_ra_lo    <= '0;
      obs_rd_addr <= '0;
      pm_rd_addr  <= '0;
      obs_rd_ch   <= '0;
      pm_rd_ch    <= '0;
      obs_rdy     <= 1'b0;
      pm_rdy      <= 1'b0;
      obs_dat     <= '0;
      pm_dat      <= '0;
      clearing    <= 1'b1;
      clr_cnt     <= '0;
      sign_we     <= 1'b0;
      sign_addr   <= '0;
      sign_val    <= 1'b0;
      x_tog       <= 1'b0;
      x_addr      <= '0;
      x_data      <= '0;
      bus_rdata   <= '0;
    end else begin
      obs_arm     <= 1'b0;
      obs_sw_trig <= 1'b0;
      pm_arm      <= 1'b0;
      obs_rd_req  <= 1'b0;
      pm_rd_req   <= 1'b0;
      sign_we     <= 1'b0;

      if (clearing) begin
        sign_we   <= 1'b1;
        sign_addr <= bunch_t'(clr_cnt);
        sign_val  <= 1'b0;
        clr_cnt   <= clr_cnt + 1'b1;
        if (clr_cnt == AW'(DEPTH - 1)) clearing <= 1'b0;
      end

      if (obs_rd_valid) begin obs_dat <= obs_rd_data; obs_rdy <= 1'b1; end
      if (pm_rd_valid)  begin pm_dat  <= pm_rd_data;  pm_rdy  <= 1'b1; end

      if (bus_wr) begin
        if (is80) begin
          x_addr <= bus_addr;
          x_data <= bus_wdata;
          x_tog  <= ~x_tog;
        end
        unique case (bus_addr) inside
          16'h0000: begin
            cfg.notch1_on <= bus_wdata[0]; cfg.notch2_on <= bus_wdata[1];
            cfg.hilb1_on  <= bus_wdata[2]; cfg.hilb2_on  <= bus_wdata[3];
            cfg.pu1_on    <= bus_wdata[4]; cfg.pu2_on    <= bus_wdata[5];
            cfg.loop_on   <= bus_wdata[6]; cfg.pert_on   <= bus_wdata[7];
            cfg.pert_bank <= bus_wdata[8];
          end
          16'h0001: cfg.a1 <= bus_wdata;
          16'h0002: cfg.a2 <= bus_wdata;
          16'h0003: cfg.h1[0] <= bus_wdata;
          16'h0004: cfg.h1[1] <= bus_wdata;
          16'h0005: cfg.h1[2] <= bus_wdata;
          16'h0006: cfg.h2[0] <= bus_wdata;
          16'h0007: cfg.h2[1] <= bus_wdata;
          16'h0008: cfg.h2[2] <= bus_wdata;
          16'h0009: cfg.obs_decim <= bus_wdata[3:0];
          16'h000A: cfg.pert_rate <= bus_wdata[3:0];
          16'h000B: cfg.pert_len  <= bus_wdata[11:0];
          16'h000C: begin
            obs_arm     <= bus_wdata[0];
            obs_sw_trig <= bus_wdata[1];
            pm_arm      <= bus_wdata[2];
          end
          16'h0010: obs_ra_lo <= bus_wdata;
          16'h0011: begin
            obs_rd_addr <= MEM_AW'({bus_wdata[3:0], obs_ra_lo});
            obs_rd_ch   <= bus_wdata[6:4];
            obs_rd_req  <= 1'b1;
            obs_rdy     <= 1'b0;
          end
          16'h0018: pm_ra_lo <= bus_wdata;
          16'h0019: begin
            pm_rd_addr <= MEM_AW'({bus_wdata[3:0], pm_ra_lo});
            pm_rd_ch   <= bus_wdata[6:4];
            pm_rd_req  <= 1'b1;
            pm_rdy     <= 1'b0;
          end
          [16'h1000:16'h1FFF]: begin
            if (!clearing) begin
              sign_we   <= 1'b1;
              sign_addr <= bunch_t'(bus_addr[11:0]);
              sign_val  <= bus_wdata[0];
            end
          end
          default: ;
        endcase
      end

      if (bus_rd) begin
        unique case (bus_addr)
          16'h0000: bus_rdata <= {7'd0, cfg.pert_bank, cfg.pert_on, cfg.loop_on,
                                  cfg.pu2_on, cfg.pu1_on, cfg.hilb2_on, cfg.hilb1_on,
                                  cfg.notch2_on, cfg.notch1_on};
          16'h0001: bus_rdata <= cfg.a1;
          16'h0002: bus_rdata <= cfg.a2;
          16'h0009: bus_rdata <= {12'd0, cfg.obs_decim};
          16'h000A: bus_rdata <= {12'd0, cfg.pert_rate};
          16'h000B: bus_rdata <= {4'd0, cfg.pert_len};
          16'h000D: bus_rdata <= {11'd0, clearing, pm_rdy, obs_rdy, pm_recording, obs_recording};
          16'h0012: bus_rdata <= obs_dat;
          16'h0013: bus_rdata <= obs_last_w[15:0];
          16'h0014: bus_rdata <= {12'd0, obs_last_w[19:16]};
          16'h001A: bus_rdata <= pm_dat;
          16'h001B: bus_rdata <= pm_last_w[15:0];
          16'h001C: bus_rdata <= {12'd0, pm_last_w[19:16]};
          default:  bus_rdata <= 16'hDEAD;
        endcase
      end
    end
  end

  // clk80d side of the write handshake
  logic t1, t2, t3;
  always_ff @(posedge clk80d) begin
    if (!rst80_n) begin
      t1 <= 1'b0; t2 <= 1'b0; t3 <= 1'b0;
      w80_we <= 1'b0;
      w80_addr <= '0;
      w80_data <= '0;
    end else begin
      t1 <= x_tog;
      t2 <= t1;
      t3 <= t2;
      w80_we <= (t2 != t3);
      if (t2 != t3) begin
        w80_addr <= x_addr;
        w80_data <= x_data;
      end
    end
  end
endmodule
