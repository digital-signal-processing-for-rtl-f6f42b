// Self-checking test of observation_memory with a 64-sample buffer and the
// SRAM model. Channel c carries c*1000 + t (t counts clocks) except channel 7,
// which alternates +800/-800 every clock so that its 4-sample average is 0.
// At decimation 2^2 the bench counts SRAM writes (one per 4 clocks), stops the
// recording by software trigger, checks that writing stops, and reads back
// the buffer: successive addresses must hold averages 4 clocks apart, all
// channels of one address must come from the same clocks, the newest must be
// from the last 16 clocks before the trigger, and channel 7 must be 0. Then it
// re-arms at full rate, stops by hardware trigger and checks steps of 1 and
// the raw alternation of channel 7.
module tb_observation_memory;
  import dspu_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, arm, trig_hw, trig_sw, recording, sram_we, rd_req, rd_valid;
  logic [3:0] decim_log2;
  logic [AW-1:0] last_addr, sram_addr, rd_addr;
  logic [3:0][35:0] sram_wdata, sram_rdata;
  logic [2:0] rd_ch;
  sample_t ch [NCH];
  sample_t rd_data;
  int checks = 0, failures = 0;
  int t, writes;

  observation_memory #(.ADDR_W(AW)) dut (.clk, .rst_n, .ch, .decim_log2, .arm, .trig_hw, .trig_sw,
    .recording, .last_addr, .sram_addr, .sram_we, .sram_wdata, .sram_rdata, .rd_req, .rd_addr, .rd_ch,
    .rd_data, .rd_valid);
  sram_model #(.ADDR_W(AW)) u_sram (.clk, .addr(sram_addr), .we(sram_we), .wdata(sram_wdata), .rdata(sram_rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    t++;
    for (int c = 0; c < 7; c++) ch[c] = sample_t'(c * 1000 + t);
    ch[7] = (t % 2) ? 16'sd800 : -16'sd800;
    if (sram_we) writes++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic readback(input logic [AW-1:0] a, input int c, output int v);
    int n;
    rd_addr = a; rd_ch = 3'(c); rd_req = 1;
    @(negedge clk);
    rd_req = 0;
    n = 0;
    while (!rd_valid && n < 20) begin @(negedge clk); n++; end
    check(rd_valid, "readback timed out");
    v = int'(rd_data);
    @(negedge clk);
  endtask

  initial begin
    int v, v0, prev, t_trig, w0;
    rst_n = 0; arm = 0; trig_hw = 0; trig_sw = 0; decim_log2 = 2; rd_req = 0; rd_addr = 0; rd_ch = 0;
    t = 0; writes = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    arm = 1; @(negedge clk); arm = 0;
    repeat (100) @(negedge clk);
    w0 = writes;
    repeat (400) @(negedge clk);
    check(writes - w0 == 100, $sformatf("%0d writes in 400 clocks at 1/4 rate", writes - w0));
    check(recording, "not recording");
    trig_sw = 1; t_trig = t; @(negedge clk); trig_sw = 0;
    repeat (3) @(negedge clk);
    w0 = writes;
    repeat (100) @(negedge clk);
    check(writes == w0, "writes after trigger");
    check(!recording, "still recording");
    for (int d = 0; d < 40; d++) begin
      readback(last_addr - AW'(d), 0, v0);
      if (d == 0) check(v0 > t_trig - 16 && v0 <= t_trig, $sformatf("newest %0d trigger %0d", v0, t_trig));
      if (d > 0) check(prev - v0 == 4, $sformatf("step %0d", prev - v0));
      for (int c = 1; c < 8; c++) begin
        readback(last_addr - AW'(d), c, v);
        if (c < 7) check(v - c * 1000 == v0, $sformatf("channel %0d value %0d vs %0d", c, v, v0));
        else check(v == 0, $sformatf("channel 7 average %0d", v));
      end
      prev = v0;
    end
    // full rate, hardware trigger
    decim_log2 = 0;
    arm = 1; @(negedge clk); arm = 0;
    repeat (200) @(negedge clk);
    trig_hw = 1; @(negedge clk); trig_hw = 0;
    repeat (5) @(negedge clk);
    check(!recording, "hw trigger ignored");
    for (int d = 0; d < 30; d++) begin
      readback(last_addr - AW'(d), 0, v0);
      if (d > 0) check(prev - v0 == 1, $sformatf("full-rate step %0d", prev - v0));
      readback(last_addr - AW'(d), 7, v);
      check(v == ((v0 % 2) ? 800 : -800), $sformatf("full-rate channel 7 %0d at t %0d", v, v0));
      prev = v0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
