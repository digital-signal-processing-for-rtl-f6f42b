// Closed-loop test of dspu_top at its full size: a simple beam model sits
// between the DAC output and the two pick-up links, and the test checks that
// the feedback really damps betatron oscillations bunch by bunch.
// Beam model (this test's own): each of the 3564 bunch slots has normalised
// coordinates (x, p). On every pass the bunch is rotated by the betatron phase
// advance mu = 2*pi*0.31 per turn. Pick-up 1 then measures x. Pick-up 2 is
// 90 degrees further on and measures p. The kicker is co-located with pick-up
// 1: the DAC sample of the 80 MHz phase that carries the bunch sample (not
// the interpolated midpoint), present while a bunch passes, changes that
// bunch's p by K * (code - 8192).
// Steps:
// 1. Calibration. Only bunch 100 sends an impulse, with delay 1. The slot at
//    which the impulse appears at the DAC gives the loop latency. The delay
//    function is then set so that the loop takes exactly one turn, and the
//    impulse must come back on bunch 100 itself.
// 2. Bunch 100 is marked in the sign table. Its impulse must come back
//    negated, which checks that the table is looked up for the right bunch.
// 3. Damping, with the closed-orbit notch on. Both pick-ups see a constant
//    closed-orbit offset (3000 and -1500) on top of the oscillation, which
//    the notch must remove. All bunches start at amplitude 2000 in a
//    coupled-bunch pattern. The mixing coefficients come from the standard
//    two-pick-up formula
//      b1,2 = -1/2 * (cos(D)/cos(dphi/2) -/+ sin(D)/sin(dphi/2)),
//      D = 3*pi*Qf + phi_k - (phi_1 + phi_2)/2,
//    with pick-up spacing dphi = 90 degrees and the kicker at pick-up 1
//    (phi_k = phi_1 = 0). The 3*pi*Qf term covers the one-turn delay (2*pi*Qf)
//    and the half-turn phase of the notch (pi*Qf). Bunch 500 is marked in
//    the sign table (anti-damping). After 40 turns every bunch's
//    amplitude must be within 10 of an ideal floating-point model of the same
//    loop (notch, one-turn delay, quantised mixing coefficients, 16-to-14-bit
//    scaling).
//    The damped bunches must have fallen below 35% of the start amplitude and
//    bunch 500 must have grown above 3 times it.
module tb_damping_loop;
  import dspu_pkg::*;
  localparam int    T      = 3564;
  localparam real   PI     = 3.14159265358979;
  localparam real   MU     = 2.0 * PI * QF;
  localparam real   K      = 0.4;
  localparam real   A0     = 2000.0;
  localparam int    CAL_B  = 100;
  localparam int    ANTI_B = 500;
  localparam int    TURNS  = 40;
  localparam real   OFF1   = 3000.0;
  localparam real   OFF2   = -1500.0;
  localparam real   QF     = 0.31;

  logic clk80 = 0, clk40 = 0, clk80d = 0, rx1_clk = 0, rx2_clk = 0;
  always #6.2375 clk80 = ~clk80;
  always @(posedge clk80) clk40 <= ~clk40;
  always @(clk80) clk80d <= #2.7 clk80;
  always @(clk40) rx1_clk <= #5.0 clk40;
  always @(clk40) rx2_clk <= #9.1 clk40;

  logic rst_n, rx1_frev, rx2_frev, frev, obs_trig_hw, pm_trig, pert_trig;
  sample_t rx1_data, rx2_data;
  logic [1:0] geq_sel;
  logic [15:0] func_b1, func_b2, func_gain;
  logic [11:0] func_delay;
  logic bus_wr, bus_rd;
  logic [15:0] bus_addr, bus_wdata, bus_rdata;
  logic [17:0] obs_sram_addr, pm_sram_addr;
  logic obs_sram_we, pm_sram_we, pert_active;
  logic [3:0][35:0] obs_sram_wdata, obs_sram_rdata, pm_sram_wdata, pm_sram_rdata;
  logic [13:0] dac_data;
  logic [15:0] dac_gain_ref;

  dspu_top dut (.*);
  sram_model u_obs_sram (.clk(clk40), .addr(obs_sram_addr), .we(obs_sram_we), .wdata(obs_sram_wdata), .rdata(obs_sram_rdata));
  sram_model u_pm_sram  (.clk(clk40), .addr(pm_sram_addr),  .we(pm_sram_we),  .wdata(pm_sram_wdata),  .rdata(pm_sram_rdata));

  int checks = 0, failures = 0;

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic sample_t sat_word(input real v);
    if (v > 32767.0) return 16'sh7FFF;
    if (v < -32768.0) return 16'sh8000;
    return sample_t'(int'(v));
  endfunction

  // ---------------- beam ----------------
  bit   beam_mode = 0, kick_on = 0;
  real  x [T], p [T];          // bunches as seen by the design
  real  xi [T], pi_ [T];       // ideal model of the same loop
  real  si [T];                // ideal kick signal of the previous turn
  real  m1p [T], m2p [T];      // ideal pick-up readings of the previous turn
  sample_t m2 [T];             // pick-up 2 reading of the current turn
  int   cur_slot = 0, turn1 = 0, full_par = -1;
  real  c1, c2;                // mixing coefficients as quantised in 3.13

  task automatic rotate(inout real a, inout real b);
    real na;
    na = a * $cos(MU) + b * $sin(MU);
    b  = -a * $sin(MU) + b * $cos(MU);
    a  = na;
  endtask

  // link 1: the kicker/pick-up 1 position; rotates each bunch as it passes
  initial begin
    int s = 17;
    rx1_frev = 0; rx1_data = 0;
    forever begin
      @(negedge rx1_clk);
      cur_slot = s;
      rx1_frev = (s == 0);
      if (beam_mode) begin
        if (turn1 > 0) begin
          rotate(x[s], p[s]);
          rotate(xi[s], pi_[s]);
        end
        begin
          real k_prev;
          k_prev = si[s];
          // measured before this pass's kick: notch (halved one-turn
          // difference), mixing, 16-to-14-bit scaling
          si[s] = (c1 * (xi[s] + OFF1 - m1p[s]) + c2 * (pi_[s] + OFF2 - m2p[s])) / 8.0;
          m1p[s] = xi[s] + OFF1;
          m2p[s] = pi_[s] + OFF2;
          if (kick_on) pi_[s] += (s == ANTI_B ? -K : K) * k_prev;
        end
        rx1_data = sat_word(x[s] + OFF1);
        m2[s] = sat_word(p[s] + OFF2);
      end else begin
        rx1_data = (s == CAL_B) ? 16'sd4000 : 16'sd0;
        m2[s] = 0;
      end
      s++;
      if (s == T) begin s = 0; turn1++; end
    end
  end
  // link 2 runs five slots behind link 1, so it always sends this turn's value
  initial begin
    int s = 12;
    rx2_frev = 0; rx2_data = 0;
    forever begin
      @(negedge rx2_clk);
      rx2_frev = (s == 0);
      rx2_data = m2[s];
      s = (s + 1) % T;
    end
  end
  initial begin
    int s = 0;
    frev = 0;
    forever begin
      @(negedge clk40);
      frev = (s == 1000);
      s = (s + 1) % T;
    end
  end

  // ---------------- kicker and DAC monitor ----------------
  int n80 = 0, peak_slot = -1, peak_code = 0, peak_par = -1;
  int kicks = 0;
  always @(negedge clk80d) begin
    int c;
    c = int'(dac_data);
    n80++;
    if (c != 8192 && (c - 8192 > 700 || 8192 - c > 700)) begin
      peak_slot = cur_slot; peak_code = c; peak_par = n80 & 1;
    end
    if (kick_on && (n80 & 1) == full_par) begin
      p[cur_slot] += K * real'(c - 8192);
      kicks++;
    end
  end

  // ---------------- register bus ----------------
  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk40);
    bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk40);
    bus_wr = 0;
    repeat (5) @(negedge clk40);
  endtask

  // wait two turns and return where the calibration impulse came out
  task automatic find_peak(output int slot, output int code, output int par);
    peak_slot = -1;
    repeat (2 * T) @(negedge clk40);
    slot = peak_slot; code = peak_code; par = peak_par;
  endtask

  initial begin
    int slot, code, par, lat, d;
    real amax_damped, a, ai, err_max;
    rst_n = 0; obs_trig_hw = 0; pm_trig = 0; pert_trig = 0; geq_sel = 0;
    bus_wr = 0; bus_rd = 0; bus_addr = 0; bus_wdata = 0;
    func_b1 = 16'd8192; func_b2 = 16'd0; func_gain = 16'h4000; func_delay = 12'd1;
    repeat (20) @(negedge clk40);
    rst_n = 1;
    repeat (4200) @(negedge clk40);     // sign table clearing
    wr(16'h0000, 16'h0070);             // pick-ups on, loop on, notch and 3-turn filters off

    // 1. latency calibration
    find_peak(slot, code, par);
    check(slot >= 0 && code == 8192 + 1000, $sformatf("calibration impulse not seen (slot %0d code %0d)", slot, code));
    full_par = par;
    lat = (slot - CAL_B + T) % T;
    d = 1 + T - lat;
    $display("loop latency at delay 1: %0d bunch slots; delay set to %0d", lat, d);
    check(d >= 1 && d <= 4095, "delay out of range");
    func_delay = 12'(d);
    find_peak(slot, code, par);
    check(slot == CAL_B && code == 9192 && par == full_par,
          $sformatf("one-turn loop: impulse on slot %0d code %0d, expected slot %0d", slot, code, CAL_B));

    // 2. sign table: the marked bunch comes back negated
    wr(16'h1000 + 16'(CAL_B), 16'h0001);
    find_peak(slot, code, par);
    check(slot == CAL_B && code == 8192 - 1000,
          $sformatf("sign: impulse on slot %0d code %0d, expected slot %0d code 7192", slot, code, CAL_B));
    wr(16'h1000 + 16'(CAL_B), 16'h0000);
    wr(16'h1000 + 16'(ANTI_B), 16'h0001);

    // 3. damping
    begin
      real dq, dphi, b1r, b2r;
      dphi = PI / 2.0;
      dq = 3.0 * PI * QF + 0.0 - (0.0 + dphi) / 2.0;
      b1r = -0.5 * ($cos(dq) / $cos(dphi / 2.0) - $sin(dq) / $sin(dphi / 2.0));
      b2r = -0.5 * ($cos(dq) / $cos(dphi / 2.0) + $sin(dq) / $sin(dphi / 2.0));
      $display("mixing coefficients b1 %0.4f b2 %0.4f", b1r, b2r);
      func_b1 = 16'($rtoi($floor(b1r * 8192.0 + 0.5)));
      func_b2 = 16'($rtoi($floor(b2r * 8192.0 + 0.5)));
    end
    c1 = real'(signed'(func_b1)) / 8192.0;
    c2 = real'(signed'(func_b2)) / 8192.0;
    @(negedge rx1_clk);
    wr(16'h0000, 16'h0073);             // notch filters on
    wait (cur_slot == T - 1);
    @(negedge clk40);
    for (int b = 0; b < T; b++) begin
      real ph;
      ph = 2.0 * PI * 7.0 * real'(b) / real'(T);
      x[b] = A0 * $cos(ph); p[b] = A0 * $sin(ph);
      xi[b] = x[b]; pi_[b] = p[b]; si[b] = 0.0;
      m1p[b] = (b == CAL_B) ? 4000.0 : 0.0;    // the notch history holds the calibration turn
      m2p[b] = 0.0;
    end
    turn1 = 0;
    beam_mode = 1;
    // the first turn of kicks still comes from the calibration data
    wait (turn1 == 1);
    kick_on = 1;
    wait (turn1 == TURNS + 1);
    @(negedge clk40);
    kick_on = 0;

    amax_damped = 0.0; err_max = 0.0;
    for (int b = 0; b < T; b++) begin
      a  = $sqrt(x[b] * x[b] + p[b] * p[b]);
      ai = $sqrt(xi[b] * xi[b] + pi_[b] * pi_[b]);
      if (b != ANTI_B && a > amax_damped) amax_damped = a;
      if (a - ai > err_max) err_max = a - ai;
      if (ai - a > err_max) err_max = ai - a;
    end
    a = $sqrt(x[ANTI_B] * x[ANTI_B] + p[ANTI_B] * p[ANTI_B]);
    $display("after %0d turns: largest damped amplitude %0.1f, anti-damped bunch %0.1f, largest deviation from ideal %0.1f (start %0.0f), %0d kicks",
             TURNS, amax_damped, a, err_max, A0, kicks);
    check(kicks > TURNS * (T - 10), "kicker did not act on every pass");
    check(amax_damped < 0.35 * A0, "oscillations not damped");
    check(err_max < 10.0, "damping differs from the ideal loop");
    check(a > 3.0 * A0, "marked bunch not anti-damped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
