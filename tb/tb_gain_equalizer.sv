// Self-checking test of gain_equalizer (16 taps, 3 sets). Checks the
// pass-through after reset, then loads three random sets and switches between
// them with sel every few dozen samples; each output must be sum c[s][i]*x[n-i]
// (rounded from 2.14, clipped) with s the set selected one clock before the
// output's last input sample, computed from the bench's own history.
module tb_gain_equalizer;
  import dspu_pkg::*;
  localparam int TAPS = 16;
  localparam int NSETS = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, coef_we;
  logic [5:0] coef_addr;
  logic [1:0] sel;
  int selh [2];
  logic [15:0] coef_data;
  sample_t din, dout;
  int checks = 0, failures = 0;
  int c [NSETS][TAPS];
  int hist [TAPS + 2];
  gain_equalizer dut (.clk, .rst_n, .sel, .coef_we, .coef_addr, .coef_data, .din, .dout);

  task automatic step(input int x, input bit check);
    longint acc;
    din = sample_t'(x);
    @(negedge clk);
    for (int i = TAPS + 1; i > 0; i--) hist[i] = hist[i-1];
    selh[1] = selh[0]; selh[0] = int'(sel);
    hist[0] = x;
    if (check) begin
      acc = 0;
      for (int i = 0; i < TAPS; i++) acc += longint'(c[selh[1]][i]) * longint'(hist[1+i]);
      acc = (acc + 8192) >>> 14;
      if (acc > 32767) acc = 32767;
      if (acc < -32768) acc = -32768;
      checks++;
      if (longint'(dout) != acc) begin
        failures++;
        if (failures < 10) $display("got %0d exp %0d", dout, acc);
      end
    end
  endtask

  task automatic load(input int range);
    for (int s = 0; s < NSETS; s++)
    for (int i = 0; i < TAPS; i++) begin
      c[s][i] = $urandom_range(0, 2 * range) - range;
      coef_we = 1; coef_addr = 6'(s * TAPS + i); coef_data = 16'(c[s][i]);
      step($urandom_range(0, 65535) - 32768, 0);
    end
    coef_we = 0;
    for (int i = 0; i < TAPS + 2; i++) step($urandom_range(0, 65535) - 32768, 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; coef_we = 0; coef_addr = 0; coef_data = 0; din = 0;
    foreach (c[s, i]) c[s][i] = (i == 0) ? 16384 : 0;
    sel = 0; selh[0] = 0; selh[1] = 0;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < TAPS + 2; i++) step($urandom_range(0, 65535) - 32768, 0);
    for (int i = 0; i < 500; i++) step($urandom_range(0, 65535) - 32768, 1);
    load(1500);
    for (int i = 0; i < 2000; i++) begin
      if (i % 37 == 0) sel = 2'($urandom_range(0, NSETS - 1));
      step($urandom_range(0, 65535) - 32768, 1);
    end
    load(32767);
    for (int i = 0; i < 2000; i++) begin
      if (i % 37 == 0) sel = 2'($urandom_range(0, NSETS - 1));
      step($urandom_range(0, 65535) - 32768, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
