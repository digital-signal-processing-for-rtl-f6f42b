// Self-checking test of dspu_regs with a 16-entry sign table. Checks: the
// table is cleared after reset (one write of +1 per bunch) and bus writes to
// it are held off meanwhile; settings written over the bus appear in cfg and
// read back; command bits give one-clock pulses; sign writes reach the table
// port; writes for the 80 MHz domain arrive there once each with their
// address and data; a readback request carries address and channel and the
// returned word is readable with the ready flag set.
module tb_dspu_regs;
  import dspu_pkg::*;
  logic clk = 0, clk80d = 0;
  always #12.5 clk = ~clk;
  initial begin #3.1; forever #6.25 clk80d = ~clk80d; end
  logic rst_n, rst80_n, bus_wr, bus_rd;
  logic [15:0] bus_addr, bus_wdata, bus_rdata;
  dspu_cfg_t cfg;
  logic obs_arm, obs_sw_trig, pm_arm, sign_we, sign_val;
  bunch_t sign_addr;
  logic obs_rd_req, pm_rd_req, obs_rd_valid, pm_rd_valid;
  logic [17:0] obs_rd_addr, pm_rd_addr;
  logic [2:0] obs_rd_ch, pm_rd_ch;
  sample_t obs_rd_data, pm_rd_data;
  logic w80_we;
  logic [15:0] w80_addr, w80_data;
  int checks = 0, failures = 0;
  int clear_writes = 0, arm_pulses = 0, trig_pulses = 0, pm_arm_pulses = 0, w80_count = 0;
  int sign_seen_addr = -1, sign_seen_val = -1;
  logic [15:0] w80_last_addr, w80_last_data;
  logic [17:0] obs_req_addr;
  logic [2:0]  obs_req_ch;
  int obs_reqs = 0;

  dspu_regs #(.DEPTH(16)) dut (.clk, .rst_n, .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata, .cfg,
    .obs_arm, .obs_sw_trig, .pm_arm, .sign_we, .sign_addr, .sign_val,
    .obs_recording(1'b1), .obs_last(18'h2_1234), .obs_rd_req, .obs_rd_addr, .obs_rd_ch, .obs_rd_data, .obs_rd_valid,
    .pm_recording(1'b0), .pm_last(18'h0_0042), .pm_rd_req, .pm_rd_addr, .pm_rd_ch, .pm_rd_data, .pm_rd_valid,
    .clk80d, .rst80_n, .w80_we, .w80_addr, .w80_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit clear_window = 1;
  always @(negedge clk) begin
    if (sign_we && clear_window && sign_val == 1'b0) clear_writes++;
    if (sign_we && (!clear_window || sign_val)) begin sign_seen_addr = int'(sign_addr); sign_seen_val = int'(sign_val); end
    if (obs_arm) arm_pulses++;
    if (obs_sw_trig) trig_pulses++;
    if (pm_arm) pm_arm_pulses++;
    if (obs_rd_req) begin obs_reqs++; obs_req_addr = obs_rd_addr; obs_req_ch = obs_rd_ch; end
  end
  always @(negedge clk80d) if (w80_we) begin w80_count++; w80_last_addr = w80_addr; w80_last_data = w80_data; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk);
    bus_wr = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    bus_addr = a; bus_rd = 1;
    @(negedge clk);
    bus_rd = 0;
    d = bus_rdata;
  endtask

  initial begin
    logic [15:0] d;
    rst_n = 0; rst80_n = 0; bus_wr = 0; bus_rd = 0; bus_addr = 0; bus_wdata = 0;
    obs_rd_valid = 0; pm_rd_valid = 0; obs_rd_data = 0; pm_rd_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; rst80_n = 1;
    // a table write during clearing is ignored
    wr(16'h1003, 16'h0001);
    repeat (20) @(negedge clk);
    clear_window = 0;
    check(sign_seen_addr == -1, "sign write accepted while clearing");
    check(clear_writes == 16, $sformatf("%0d clearing writes", clear_writes));
    rd(16'h000D, d);
    check(d[4] == 1'b0 && d[0] == 1'b1 && d[1] == 1'b0, $sformatf("status %h", d));
    // settings
    wr(16'h0000, 16'h01FF);
    check(cfg.notch1_on && cfg.notch2_on && cfg.hilb1_on && cfg.hilb2_on && cfg.pu1_on && cfg.pu2_on
          && cfg.loop_on && cfg.pert_on && cfg.pert_bank, "CTRL bits");
    wr(16'h0000, 16'h0050);
    check(!cfg.notch1_on && cfg.pu1_on && cfg.loop_on && !cfg.pu2_on && !cfg.pert_bank, "CTRL bits 2");
    rd(16'h0000, d); check(d == 16'h0050, $sformatf("CTRL read %h", d));
    wr(16'h0001, 16'h6000); check(cfg.a1 == 16'h6000, "a1");
    wr(16'h0002, 16'h7123); rd(16'h0002, d); check(cfg.a2 == 16'h7123 && d == 16'h7123, "a2");
    wr(16'h0004, 16'hC000); check(cfg.h1[1] == 16'hC000, "h1[1]");
    wr(16'h0008, 16'h1234); check(cfg.h2[2] == 16'h1234, "h2[2]");
    wr(16'h0009, 16'h000F); check(cfg.obs_decim == 4'hF, "obs_decim");
    wr(16'h000A, 16'h0003); check(cfg.pert_rate == 4'h3, "pert_rate");
    wr(16'h000B, 16'h0123); check(cfg.pert_len == 12'h123, "pert_len");
    // commands
    wr(16'h000C, 16'h0007);
    check(arm_pulses == 1 && trig_pulses == 1 && pm_arm_pulses == 1, "command pulses");
    // sign table
    wr(16'h1005, 16'h0001);
    check(sign_seen_addr == 5 && sign_seen_val == 1, "sign write");
    // 80 MHz domain writes
    wr(16'h0105, 16'hABCD);
    repeat (3) @(negedge clk);
    check(w80_count == 1 && w80_last_addr == 16'h0105 && w80_last_data == 16'hABCD, "phase FIR write");
    wr(16'h2FFF, 16'h1357);
    repeat (3) @(negedge clk);
    check(w80_count == 2 && w80_last_addr == 16'h2FFF && w80_last_data == 16'h1357, "perturbation write");
    wr(16'h000C, 16'h0008);
    repeat (3) @(negedge clk);
    check(w80_count == 3 && w80_last_addr == 16'h000C, "perturbation restart");
    // readback
    wr(16'h0010, 16'hBEEF);
    wr(16'h0011, 16'h0052);
    check(obs_reqs == 1 && obs_req_addr == 18'h2BEEF && obs_req_ch == 3'd5, "readback request");
    rd(16'h000D, d); check(d[2] == 1'b0, "ready before data");
    obs_rd_data = 16'sh1CAB; obs_rd_valid = 1; @(negedge clk); obs_rd_valid = 0;
    rd(16'h000D, d); check(d[2] == 1'b1, "ready after data");
    rd(16'h0012, d); check(d == 16'h1CAB, $sformatf("readback data %h", d));
    rd(16'h0013, d); check(d == 16'h1234, "last address low");
    rd(16'h0014, d); check(d == 16'h0002, "last address high");
    rd(16'h001B, d); check(d == 16'h0042, "pm last address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
