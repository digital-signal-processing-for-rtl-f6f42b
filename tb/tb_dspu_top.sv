// End-to-end test of dspu_top at its full size (3564-slot turn, 4096-entry
// memories, 2^18-sample diagnostic buffers), with two SRAM bank models.
// Clocks: 80.16 MHz base, the bunch clock divided from it, the processing
// clock delayed from it by 3.2 ns (fine delay), two link clocks at the bunch
// rate with their own phases; the link markers and the common marker are at
// different bunch slots.
// Counter mode: pick-up 1 sends 8*(turn*3564 + slot), pick-up 2 that plus 800.
// With all filters passing, every 80 MHz DAC code is one more than the code
// before (samples and linear midpoints alternate), so code - clock count is a
// constant "offset". Each setting change must move that offset by the amount
// worked out from the setting: turn delay +10 -> -20, 3-turn filter reduced to
// "previous turn" -> -7128, pick-up 2 alone -> +200, both halves -> +100.
// Constant mode: both pick-ups send 800; the DAC level is checked against
// gain balance, notch, per-bunch sign (one bunch negated per turn), loop off,
// the perturbation record and each programmable FIR, and saturation.
// Observation and post-mortem memories are triggered and read back over the
// register bus. Each mechanism must be seen at least once.
module tb_dspu_top;
  import dspu_pkg::*;
  localparam int T = 3564;
  logic clk80 = 0, clk40 = 0, clk80d = 0, rx1_clk = 0, rx2_clk = 0;
  always #6.2375 clk80 = ~clk80;
  always @(posedge clk80) clk40 <= ~clk40;
  always @(clk80) clk80d <= #3.2 clk80;
  always @(clk40) rx1_clk <= #7.0 clk40;
  always @(clk40) rx2_clk <= #11.3 clk40;

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
  bit const_mode = 0;

  // mechanisms seen
  typedef enum int {M_RESYNC, M_GAIN, M_NOTCH, M_HILBERT, M_PU_SWITCH, M_MIX, M_DELAY, M_SIGN, M_LOOP_OFF,
                    M_CDC, M_INTERP, M_PERT, M_PERT_INTERP, M_PERT_RESTART, M_FIR, M_GEQ, M_LOWPASS,
                    M_SAT, M_OBS, M_PM, M_NMECH} mech_e;
  int seen [M_NMECH];
  string mname [M_NMECH] = '{"resync", "gain balance", "notch", "3-turn filter", "pick-up switch", "mixing",
    "turn delay", "bunch sign", "loop off", "clock-domain change", "interpolation", "perturbation",
    "perturbation interpolation", "perturbation restart", "phase FIR", "gain equaliser set", "low-pass",
    "DAC saturation", "observation", "post-mortem"};

  initial begin
    #20ms;
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

  // ---------------- pick-up links ----------------
  function automatic sample_t word(input int pu, input int turn, input int s);
    if (const_mode) return 16'sd800;
    return sample_t'((turn * T + s) * 8 + (pu == 2 ? 800 : 0));
  endfunction

  initial begin
    int s = 17, turn = 0;
    rx1_frev = 0; rx1_data = 0;
    forever begin
      @(negedge rx1_clk);
      rx1_frev = (s == 0);
      rx1_data = word(1, turn, s);
      s++;
      if (s == T) begin s = 0; turn++; end
    end
  end
  initial begin
    int s = 2000, turn = 0;
    rx2_frev = 0; rx2_data = 0;
    forever begin
      @(negedge rx2_clk);
      rx2_frev = (s == 0);
      rx2_data = word(2, turn, s);
      s++;
      if (s == T) begin s = 0; turn++; end
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

  // ---------------- DAC monitor ----------------
  int n80 = 0, off = 0, off_prev = 0, steady = 0;
  int code_h [3];
  always @(negedge clk80d) begin
    int c;
    c = int'(dac_data);
    n80++;
    off = (c - n80) & 16'h3FFF;
    if (off == off_prev) steady++;
    else if (!(code_h[0] > 16300 || code_h[1] > 16300 || c > 16300)) steady = 0;
    off_prev = off;
    code_h[2] = code_h[1]; code_h[1] = code_h[0]; code_h[0] = c;
    if (c == 16383) seen[M_SAT]++;
  end
  always @(negedge clk80d) begin
    if (dut.v80) seen[M_CDC]++;
    if (dut.ptrig80 && dut.u_pert.running) seen[M_PERT_RESTART]++;
    if (dut.u_pert.running && dut.u_pert.rate_shift != 0 && dut.u_pert.ph != 0) seen[M_PERT_INTERP]++;
  end
  always @(negedge clk40) if (dut.bunch_s == 0 && dut.u_sync1.dout[2:0] == 3'b000) seen[M_RESYNC]++;

  // wait for a steady offset and return it (signed, -8192..8191)
  task automatic measure(output int o);
    int n = 0;
    repeat (600) @(negedge clk80d);
    while (steady < 400 && n < 20000) begin @(negedge clk80d); n++; end
    check(steady >= 400, "DAC stream not continuous");
    o = off;
    if (o >= 8192) o -= 16384;
  endtask

  function automatic int wrap14(input int d);
    d = d & 16'h3FFF;
    return (d >= 8192) ? d - 16384 : d;
  endfunction

  // count DAC codes equal to v over n clocks
  task automatic count_code(input int v, input int n, output int k);
    k = 0;
    repeat (n) begin
      @(negedge clk80d);
      if (int'(dac_data) == v) k++;
    end
  endtask

  task automatic level(input int v, input string what);
    int k;
    repeat (600) @(negedge clk80d);
    count_code(v, 1000, k);
    check(k == 1000, $sformatf("%s: DAC code %0d seen %0d/1000 (last %0d)", what, v, k, dac_data));
  endtask

  // ---------------- register bus ----------------
  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk40);
    bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk40);
    bus_wr = 0;
    repeat (5) @(negedge clk40);
  endtask

  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk40);
    bus_addr = a; bus_rd = 1;
    @(negedge clk40);
    bus_rd = 0;
    d = bus_rdata;
  endtask

  // read one recorded sample: base 0x10 observation, 0x18 post-mortem
  task automatic mem_read(input logic [15:0] base, input logic [17:0] a, input int ch, output logic [15:0] d);
    logic [15:0] st;
    wr(base, a[15:0]);
    wr(base + 1, {9'd0, 3'(ch), 2'd0, a[17:16]});
    repeat (10) @(negedge clk40);
    rd(16'h000D, st);
    check(st[(base == 16'h10) ? 2 : 3], "readback not ready");
    rd(base + 2, d);
  endtask

  task automatic last_addr(input logic [15:0] base, output logic [17:0] a);
    logic [15:0] lo, hi;
    rd(base + 3, lo);
    rd(base + 4, hi);
    a = {hi[1:0], lo};
  endtask

  // CTRL: b0 notch1 b1 notch2 b2 hilb1 b3 hilb2 b4 pu1 b5 pu2 b6 loop b7 pert b8 bank
  localparam logic [15:0] BASE_CTRL = 16'h0050;   // pu1 on, loop on

  initial begin
    int o0, o1, o2, k, k2;
    logic [15:0] d, d1;
    logic [17:0] la;
    rst_n = 0; obs_trig_hw = 0; pm_trig = 0; pert_trig = 0; geq_sel = 0;
    func_b1 = 16'h2000; func_b2 = 16'h0000; func_gain = 16'h1234; func_delay = 12'd100;
    bus_wr = 0; bus_rd = 0; bus_addr = 0; bus_wdata = 0;
    repeat (5) @(negedge clk40);
    rst_n = 1;
    repeat (4200) @(negedge clk40);     // sign table clearing
    wr(16'h0000, BASE_CTRL);
    wr(16'h000C, 16'h0005);              // arm observation and post-mortem
    repeat (2 * T) @(negedge clk40);
    check(dac_gain_ref == 16'h1234, "gain function to DAC reference");

    // ---- counter mode: offsets ----
    measure(o0);
    seen[M_INTERP]++;
    func_delay = 12'd110;
    measure(o1);
    check(o1 - o0 == -20, $sformatf("delay +10: offset %0d -> %0d", o0, o1));
    if (o1 - o0 == -20) seen[M_DELAY]++;

    wr(16'h0003, 16'h0000); wr(16'h0004, 16'h4000); wr(16'h0005, 16'h0000);
    wr(16'h0000, BASE_CTRL | 16'h0004);
    measure(o2);
    check(wrap14(o2 - o1) == wrap14(-2 * T), $sformatf("3-turn filter as previous turn: %0d -> %0d", o1, o2));
    if (wrap14(o2 - o1) == wrap14(-2 * T)) seen[M_HILBERT]++;
    wr(16'h0000, BASE_CTRL);

    // pick-up 2 only
    func_b1 = 16'h0000; func_b2 = 16'h2000;
    wr(16'h0000, 16'h0060);
    measure(o2);
    check(o2 - o1 == 200, $sformatf("pick-up 2 alone: %0d -> %0d", o1, o2));
    if (o2 - o1 == 200) seen[M_PU_SWITCH]++;
    // both, halves
    func_b1 = 16'h1000; func_b2 = 16'h1000;
    wr(16'h0000, 16'h0070);
    measure(o2);
    check(o2 - o1 == 100, $sformatf("half sum: %0d -> %0d", o1, o2));
    if (o2 - o1 == 100) seen[M_MIX]++;
    func_b1 = 16'h2000; func_b2 = 16'h0000;
    wr(16'h0000, BASE_CTRL);

    // ---- diagnostics ----
    wr(16'h000C, 16'h0002);              // observation software trigger
    @(negedge clk40); pm_trig = 1; @(negedge clk40); pm_trig = 0;
    repeat (20) @(negedge clk40);
    rd(16'h000D, d);
    check(d[1:0] == 2'b00, $sformatf("recorders still running, status %h", d));
    last_addr(16'h10, la);
    mem_read(16'h10, la, 0, d);
    mem_read(16'h10, la - 1, 0, d1);
    check(16'(d - d1) == 16'd8, $sformatf("observation PU1 samples %0d, %0d", d1, d));
    mem_read(16'h10, la, 1, d1);
    check(16'(d1 - d) == 16'd800, "observation PU2 channel");
    if (16'(d - d1) != 0) seen[M_OBS]++;
    last_addr(16'h18, la);
    mem_read(16'h18, la, 0, d);
    mem_read(16'h18, la - 1, 0, d1);
    check(16'(d - d1) == 16'd8, $sformatf("post-mortem PU1 samples %0d, %0d", d1, d));
    if (16'(d - d1) == 16'd8) seen[M_PM]++;

    // ---- constant mode: levels ----
    const_mode = 1;
    repeat (3 * T) @(negedge clk40);
    level(8192 + 200, "pass-through");
    wr(16'h0001, 16'h4000);
    level(8192 + 100, "gain balance 0.5");
    seen[M_GAIN]++;
    wr(16'h0001, 16'h8000);
    wr(16'h0000, BASE_CTRL | 16'h0001);
    repeat (2 * T) @(negedge clk40);
    level(8192, "notch removes the closed orbit");
    seen[M_NOTCH]++;
    wr(16'h0000, BASE_CTRL);
    repeat (2 * T) @(negedge clk40);
    wr(16'h1000 + 16'd100, 16'h0001);    // bunch 100 anti-damped
    repeat (200) @(negedge clk40);
    fork
      count_code(8192 - 200, 2 * T, k);
      count_code(8192, 2 * T, k2);
    join
    check(k == 1 && k2 == 2, $sformatf("one bunch negated per turn: %0d negative, %0d zero", k, k2));
    if (k == 1) seen[M_SIGN]++;
    wr(16'h1000 + 16'd100, 16'h0000);
    wr(16'h0000, 16'h0010);               // loop off
    level(8192, "loop off");
    seen[M_LOOP_OFF]++;

    // ---- perturbation and 80 MHz filters ----
    for (int i = 0; i < 16; i++) wr(16'h2000 + 16'(i), 16'd400);
    for (int i = 0; i < 16; i++) wr(16'h3000 + 16'(i), 16'(i * 400));
    wr(16'h000B, 16'd15);
    wr(16'h0000, 16'h0090);               // perturbation on, bank 0
    level(8192 + 100, "perturbation record");
    seen[M_PERT]++;
    wr(16'h0100, 16'h2000);               // phase FIR tap 0 = 0.5
    level(8192 + 50, "phase FIR");
    seen[M_FIR]++;
    wr(16'h0210, 16'h2000);               // equaliser set 1 tap 0 = 0.5
    geq_sel = 1;
    level(8192 + 25, "equaliser set 1");
    seen[M_GEQ]++;
    wr(16'h0307, 16'h6000);               // low-pass centre tap 1.5
    level(8192 + 38, "low-pass");
    seen[M_LOWPASS]++;
    // ramp record, slowed 4x and interpolated
    wr(16'h000A, 16'h0002);
    wr(16'h0000, 16'h0190);               // bank 1
    wr(16'h000C, 16'h0008);               // restart
    repeat (10) @(negedge clk80d);
    check(dut.u_pert.running, "perturbation not restarted");
    // saturation
    for (int i = 0; i < 16; i++) wr(16'h2000 + 16'(i), 16'd30000);
    geq_sel = 0;
    wr(16'h0100, 16'h4000);
    wr(16'h0000, 16'h0090);
    level(16383, "saturation");

    for (int m = 0; m < M_NMECH; m++) begin
      check(seen[m] > 0, $sformatf("mechanism never seen: %s", mname[m]));
      $display("mechanism %-28s seen %0d", mname[m], seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
