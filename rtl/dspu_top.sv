// Digital signal processing unit of a bunch-by-bunch transverse feedback
// (damper) for a hadron collider ring. Two beam position pick-ups deliver one
// normalised 16-bit position per bunch slot at 40.08 MHz over gigabit links;
// the unit turns them into the 14-bit, 80.16 MHz drive signal of the kicker's
// power amplifier so that every bunch receives, one turn later, a kick that
// damps its own betatron oscillation.
// 40.08 MHz (clk40) part, per pick-up: bunch_sync (align both links to the
// common revolution marker) -> gain_balance (a1/a2) -> notch_filter (remove
// the closed orbit) -> phase_shifter (optional 3-turn filter, pick-up on/off);
// then pickup_mixer (b1*x1 + b2*x2, phase function) -> turn_delay (delay
// function, up to one turn) -> bunch_sign (per-bunch +-1, loop on/off).
// 80.16 MHz part, on the externally delayed clock clk80d that sets the fine
// loop phase: fine_delay_cdc -> interpolator (2x) -> perturbation_gen (adds the
// excitation record) -> fir_filter (32-tap amplifier phase compensation) ->
// gain_equalizer (sets chosen by geq_sel) -> fir_lowpass -> dac_interface.
// observation_memory and postmortem_memory record eight clk40 signals in two
// external SRAM banks: 0 PU1 and 1 PU2 after sync, 2 the turn-delay output,
// 3 the mixer output, 4 the sign-stage output, 5-7 spare (zero).
// dspu_regs holds all settings behind a 16-bit register bus. MEM_AW sets the
// depth of both recorders: 18 (256k samples) for the card's 256k x 36 chips,
// 19 for the 512k x 36 chips it can be fitted with.
// The chain and the clock domains follow the document's block diagram. The
// bunch number from the sync stage follows the samples down the pipeline and
// through a second turn_delay with the same delay, so the per-bunch sign table
// is looked up with the number of the bunch each sample was measured on; with
// the delay function set so that the whole loop takes one turn this is also
// the bunch that receives the kick.
// Settings read in the clk80d domain (perturbation control, equaliser set) are
// static while running and are taken across the clock domains unsynchronised.
// Latency: sync output to sign input 8 + delay clk40 cycles; sign output to the
// DAC pins about 2 clk40 cycles (CDC) plus 9 + 7 clk80d cycles with pass-through
// filters.
module dspu_top
  import dspu_pkg::*;
#(
  parameter int unsigned MEM_AW = 18    // SRAM address width: 18 for 256k chips, 19 for 512k
) (
  input  logic        rst_n,
  // pick-up links (parallel side of the transceivers)
  input  logic        rx1_clk,
  input  sample_t     rx1_data,
  input  logic        rx1_frev,
  input  logic        rx2_clk,
  input  sample_t     rx2_data,
  input  logic        rx2_frev,
  // clocks and timing
  input  logic        clk40,
  input  logic        clk80d,
  input  logic        frev,
  input  logic        obs_trig_hw,
  input  logic        pm_trig,
  input  logic        pert_trig,     // clk80d domain
  input  logic [1:0]  geq_sel,       // clk80d domain
  // functions (decoded)
  input  logic [15:0] func_b1,
  input  logic [15:0] func_b2,
  input  logic [11:0] func_delay,
  input  logic [15:0] func_gain,
  // register bus (clk40)
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [15:0] bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  // SRAM banks
  output logic [MEM_AW-1:0] obs_sram_addr,
  output logic        obs_sram_we,
  output logic [3:0][35:0] obs_sram_wdata,
  input  logic [3:0][35:0] obs_sram_rdata,
  output logic [MEM_AW-1:0] pm_sram_addr,
  output logic        pm_sram_we,
  output logic [3:0][35:0] pm_sram_wdata,
  input  logic [3:0][35:0] pm_sram_rdata,
  // DAC
  output logic [13:0] dac_data,
  output logic [15:0] dac_gain_ref,
  output logic        pert_active    // excitation record playing (clk80d)
);
  logic rst40_n, rst80_n, rx1_rst_n, rx2_rst_n;
  reset_sync u_rs40 (.clk(clk40),   .rst_in_n(rst_n), .rst_out_n(rst40_n));
  reset_sync u_rs80 (.clk(clk80d),  .rst_in_n(rst_n), .rst_out_n(rst80_n));
  reset_sync u_rsr1 (.clk(rx1_clk), .rst_in_n(rst_n), .rst_out_n(rx1_rst_n));
  reset_sync u_rsr2 (.clk(rx2_clk), .rst_in_n(rst_n), .rst_out_n(rx2_rst_n));

  dspu_cfg_t cfg;
  logic obs_arm, obs_sw_trig, pm_arm;
  logic sign_we, sign_val;
  bunch_t sign_addr;
  logic obs_recording, pm_recording;
  logic [MEM_AW-1:0] obs_last, pm_last, obs_rd_addr, pm_rd_addr;
  logic obs_rd_req, pm_rd_req, obs_rd_valid, pm_rd_valid;
  logic [2:0] obs_rd_ch, pm_rd_ch;
  sample_t obs_rd_data, pm_rd_data;
  logic w80_we;
  logic [15:0] w80_addr, w80_data;

  dspu_regs #(.MEM_AW(MEM_AW)) u_regs (
    .clk(clk40), .rst_n(rst40_n), .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata,
    .cfg, .obs_arm, .obs_sw_trig, .pm_arm, .sign_we, .sign_addr, .sign_val,
    .obs_recording, .obs_last, .obs_rd_req, .obs_rd_addr, .obs_rd_ch, .obs_rd_data, .obs_rd_valid,
    .pm_recording, .pm_last, .pm_rd_req, .pm_rd_addr, .pm_rd_ch, .pm_rd_data, .pm_rd_valid,
    .clk80d, .rst80_n, .w80_we, .w80_addr, .w80_data
  );

  // ---------------- 40.08 MHz chain ----------------
  sample_t s1, s2, g1, g2, n1, n2, p1, p2, mix, dly, sgn;
  bunch_t  bunch_s, bunch_s2;
  bunch_t  bpipe [7];
  bunch_t  bdly;

  bunch_sync u_sync1 (.rx_clk(rx1_clk), .rx_rst_n(rx1_rst_n), .rx_data(rx1_data), .rx_frev(rx1_frev),
                      .clk(clk40), .rst_n(rst40_n), .frev, .dout(s1), .bunch(bunch_s));
  bunch_sync u_sync2 (.rx_clk(rx2_clk), .rx_rst_n(rx2_rst_n), .rx_data(rx2_data), .rx_frev(rx2_frev),
                      .clk(clk40), .rst_n(rst40_n), .frev, .dout(s2), .bunch(bunch_s2));

  // both links are counted from the same marker, so they agree on the bunch
  a_bunch_agree: assert property (@(posedge clk40) disable iff (!rst40_n) bunch_s == bunch_s2);

  // bunch number following the samples down the fixed pipeline
  always_ff @(posedge clk40) begin
    bpipe[0] <= bunch_s;
    for (int i = 1; i < 7; i++) bpipe[i] <= bpipe[i-1];
  end

  gain_balance u_gb1 (.clk(clk40), .din(s1), .gain(cfg.a1), .dout(g1));
  gain_balance u_gb2 (.clk(clk40), .din(s2), .gain(cfg.a2), .dout(g2));

  notch_filter u_notch1 (.clk(clk40), .en(cfg.notch1_on), .din(g1), .bunch(bpipe[0]), .dout(n1));
  notch_filter u_notch2 (.clk(clk40), .en(cfg.notch2_on), .din(g2), .bunch(bpipe[0]), .dout(n2));

  phase_shifter u_ps1 (.clk(clk40), .hilbert_en(cfg.hilb1_on), .pu_en(cfg.pu1_on), .coef(cfg.h1),
                       .din(n1), .bunch(bpipe[2]), .dout(p1));
  phase_shifter u_ps2 (.clk(clk40), .hilbert_en(cfg.hilb2_on), .pu_en(cfg.pu2_on), .coef(cfg.h2),
                       .din(n2), .bunch(bpipe[2]), .dout(p2));

  pickup_mixer u_mix (.clk(clk40), .x1(p1), .x2(p2), .b1(func_b1), .b2(func_b2), .y(mix));

  turn_delay u_delay (.clk(clk40), .rst_n(rst40_n), .delay(func_delay), .din(mix), .dout(dly));
  // the bunch number of each sample goes through the same delay, so the sign
  // table is looked up for the bunch the sample was measured on
  turn_delay #(.WIDTH(BUNCH_W)) u_bdelay (.clk(clk40), .rst_n(rst40_n), .delay(func_delay),
                                         .din(bpipe[6]), .dout(bdly));

  bunch_sign u_sign (.clk(clk40), .loop_on(cfg.loop_on), .din(dly), .bunch(bdly),
                     .wr_en(sign_we), .wr_addr(sign_addr), .wr_sign(sign_val), .dout(sgn));

  // ---------------- diagnostics ----------------
  sample_t diag [NCH];
  always_comb begin
    diag[0] = s1;
    diag[1] = s2;
    diag[2] = dly;
    diag[3] = mix;
    diag[4] = sgn;
    for (int i = 5; i < NCH; i++) diag[i] = '0;
  end

  observation_memory #(.ADDR_W(MEM_AW)) u_obs (
    .clk(clk40), .rst_n(rst40_n), .ch(diag), .decim_log2(cfg.obs_decim), .arm(obs_arm),
    .trig_hw(obs_trig_hw), .trig_sw(obs_sw_trig), .recording(obs_recording), .last_addr(obs_last),
    .sram_addr(obs_sram_addr), .sram_we(obs_sram_we), .sram_wdata(obs_sram_wdata), .sram_rdata(obs_sram_rdata),
    .rd_req(obs_rd_req), .rd_addr(obs_rd_addr), .rd_ch(obs_rd_ch), .rd_data(obs_rd_data), .rd_valid(obs_rd_valid)
  );

  postmortem_memory #(.ADDR_W(MEM_AW)) u_pm (
    .clk(clk40), .rst_n(rst40_n), .ch(diag), .arm(pm_arm), .pm_trig,
    .recording(pm_recording), .last_addr(pm_last),
    .sram_addr(pm_sram_addr), .sram_we(pm_sram_we), .sram_wdata(pm_sram_wdata), .sram_rdata(pm_sram_rdata),
    .rd_req(pm_rd_req), .rd_addr(pm_rd_addr), .rd_ch(pm_rd_ch), .rd_data(pm_rd_data), .rd_valid(pm_rd_valid)
  );

  // ---------------- 80.16 MHz chain (delayed clock) ----------------
  sample_t x80, i80, e80, f80, q80, l80;
  logic    v80;
  logic    fir_we, geq_we, lp_we, pm_we80, ptrig80;

  always_comb begin
    fir_we  = w80_we && w80_addr[15:8] == 8'h01;
    geq_we  = w80_we && w80_addr[15:8] == 8'h02;
    lp_we   = w80_we && w80_addr[15:8] == 8'h03;
    pm_we80 = w80_we && w80_addr[15:13] == 3'b001;
    ptrig80 = (w80_we && w80_addr == 16'h000C) || pert_trig;
  end

  fine_delay_cdc u_cdc (.clk40, .rst40_n, .din(sgn), .clk80d, .rst80_n, .dout(x80), .dvalid(v80));

  interpolator u_interp (.clk(clk80d), .rst_n(rst80_n), .din(x80), .dvalid(v80), .dout(i80));

  perturbation_gen u_pert (
    .clk(clk80d), .rst_n(rst80_n), .en(cfg.pert_on), .bank(cfg.pert_bank), .rate_shift(cfg.pert_rate),
    .length(cfg.pert_len), .trig(ptrig80), .wr_en(pm_we80), .wr_addr(w80_addr[12:0]), .wr_data(w80_data),
    .din(i80), .dout(e80), .running(pert_active)
  );

  fir_filter u_phase_fir (.clk(clk80d), .rst_n(rst80_n), .coef_we(fir_we), .coef_addr(w80_addr[4:0]),
                          .coef_data(w80_data), .din(e80), .dout(f80));

  gain_equalizer u_geq (.clk(clk80d), .rst_n(rst80_n), .sel(geq_sel), .coef_we(geq_we),
                        .coef_addr(w80_addr[5:0]), .coef_data(w80_data), .din(f80), .dout(q80));

  fir_lowpass u_lp (.clk(clk80d), .rst_n(rst80_n), .coef_we(lp_we), .coef_addr(w80_addr[2:0]),
                    .coef_data(w80_data), .din(q80), .dout(l80));

  dac_interface u_dac (.clk(clk80d), .din(l80), .dac_data);

  // overall loop gain: the gain function drives the DAC reference
  always_ff @(posedge clk40) dac_gain_ref <= func_gain;
endmodule
