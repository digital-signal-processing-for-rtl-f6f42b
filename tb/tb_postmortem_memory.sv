// Self-checking test of postmortem_memory with a 64-sample buffer and the
// SRAM model. Channel c carries c*1000 + t (t counts clocks), channel 7
// alternates +800/-800. The bench checks one SRAM write per clock while
// recording, that only the post-mortem trigger stops it, that the newest
// sample is from just before the trigger, and reads the whole buffer back:
// successive addresses one clock apart, all channels of one address from the
// same clock. Re-arming must resume recording.
module tb_postmortem_memory;
  import dspu_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, arm, pm_trig, recording, sram_we, rd_req, rd_valid;
  logic [AW-1:0] last_addr, sram_addr, rd_addr;
  logic [3:0][35:0] sram_wdata, sram_rdata;
  logic [2:0] rd_ch;
  sample_t ch [NCH];
  sample_t rd_data;
  int checks = 0, failures = 0;
  int t, writes;

  postmortem_memory #(.ADDR_W(AW)) dut (.clk, .rst_n, .ch, .arm, .pm_trig,
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
    rst_n = 0; arm = 0; pm_trig = 0; rd_req = 0; rd_addr = 0; rd_ch = 0;
    t = 0; writes = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      arm = 1; @(negedge clk); arm = 0;
      repeat (50) @(negedge clk);
      w0 = writes;
      repeat (300) @(negedge clk);
      check(writes - w0 == 300, $sformatf("%0d writes in 300 clocks", writes - w0));
      pm_trig = 1; t_trig = t; @(negedge clk); pm_trig = 0;
      repeat (4) @(negedge clk);
      w0 = writes;
      repeat (50) @(negedge clk);
      check(writes == w0 && !recording, "recording after post-mortem trigger");
      for (int d = 0; d < 64; d++) begin
        readback(last_addr - AW'(d), 0, v0);
        if (d == 0) check(v0 > t_trig - 5 && v0 <= t_trig + 1, $sformatf("newest %0d trigger %0d", v0, t_trig));
        if (d > 0) check(prev - v0 == 1, $sformatf("step %0d", prev - v0));
        readback(last_addr - AW'(d), d % 7, v);
        check(v - (d % 7) * 1000 == v0, $sformatf("channel %0d value %0d vs %0d", d % 7, v, v0));
        readback(last_addr - AW'(d), 7, v);
        check(v == ((v0 % 2) ? 800 : -800), "channel 7");
        prev = v0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
